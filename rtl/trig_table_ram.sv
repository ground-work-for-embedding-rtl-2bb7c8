// One trigonometric lookup table: an 18 x 1024 RAM with its access wrapper.
//
// After reset the RAM belongs to the APB side. An APB slave state machine
// follows the IDLE / SETUP / ACCESS phases of the bus (zero wait states, PREADY
// always 1) and writes PWDATA[17:0] to word PADDR[11:2] in the ACCESS phase; reads
// present the address in SETUP and return the RAM output in ACCESS. The
// microcontroller fills the table from its non-volatile memory this way. When
// DEPTH writes have been counted the wrapper raises init_done and its mux hands
// the RAM address to the DSP side for good: from then on user_rdata returns the
// word at user_addr one clock after the address, APB writes are refused with
// PSLVERR and APB reads return 0.
// RAM size, the mux and the one-way hand-over follow the design description;
// counting writes as the completion rule and the behaviour after hand-over are
// this design's choices. The RAM has no reset.
module trig_table_ram
  import foc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 18
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  apb_req_t                 apb_req,
  output apb_rsp_t                 apb_rsp,
  input  logic [$clog2(DEPTH)-1:0] user_addr,
  output logic [WIDTH-1:0]         user_rdata,
  output logic                     init_done
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {IDLE, SETUP, ACCESS} apb_phase_t;
  apb_phase_t phase;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] q;
  logic [AW:0]      wr_count;
  logic [AW-1:0]    ram_addr;
  logic             ram_we;

  wire apb_write = apb_req.psel && apb_req.penable && apb_req.pwrite;

  // the mux of the wrapper
  assign ram_addr = init_done ? user_addr : apb_req.paddr[AW+1:2];
  assign ram_we   = !init_done && apb_write;

  always_ff @(posedge clk) begin
    if (ram_we) mem[ram_addr] <= apb_req.pwdata[WIDTH-1:0];
    q <= mem[ram_addr];
  end

  assign user_rdata = q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= IDLE;
      wr_count <= '0;
    end else begin
      phase <= !apb_req.psel ? IDLE : (apb_req.penable ? ACCESS : SETUP);
      if (ram_we) wr_count <= wr_count + 1'b1;
    end
  end

  assign init_done = (wr_count == (AW+1)'(DEPTH));

  always_comb begin
    apb_rsp.pready  = 1'b1;
    apb_rsp.pslverr = init_done && apb_write;
    apb_rsp.prdata  = init_done ? 32'd0 : 32'($signed(q));
  end

  // APB rule: an ACCESS cycle directly follows its SETUP cycle (zero wait).
  a_access_after_setup: assert property (@(posedge clk) disable iff (!rst_n)
      (apb_req.psel && apb_req.penable) |-> (phase == SETUP))
    else $error("APB ACCESS without SETUP");

endmodule
