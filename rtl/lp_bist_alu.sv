// lp_bist_alu: 8-bit ALU with a low-power logic built-in self-test (BIST).
//
// When reset is released the BIST controller takes the ALU off its normal inputs,
// applies NUM_PATTERNS test patterns from the low-power LFSR (LP-LFSR), catches each
// response in the hold latch and compares it with the expected word from the ROM.
// If every response matches, the controller returns the ALU to the normal inputs,
// the normal output y1 carries its results and test stays 0. On the first mismatch
// test toggles every clock from then on and the ALU stays in test mode.
//
// Data path (one clock domain):
//   lp_lfsr.q -> input_mux (test pattern vs nop1/nop2/ncin/nsel) -> alu -> demux
//     demux normal side -> y1
//     demux test side   -> hold_latch (Qout) -> comparator <- bist_rom (Dout)
//   comparator.eq -> bist_controller, which drives the LP-LFSR step/reset, mux and
//   demux selects, latch load, ROM address and the test pin.
// The LP-LFSR has one stage per ALU input bit (21). Its stages drive the ALU inputs
// directly, so between two patterns only one ALU input bit changes: that is where the
// test power saving comes from. Pattern bits: a = q[7:0], b = q[15:8], cin = q[16],
// sel = q[20:17]. The LP-LFSR's serial output and enable vector are not needed by the
// parallel pattern path and are left unused here.
//
// Timing: test rises one clock after reset is released, each pattern takes 5 clocks,
// and a passing self-test drops test 2 + 5*NUM_PATTERNS clocks (127 by default) after
// reset release; from then on y1 = ALU(nop1, nop2, ncin, nsel) combinationally.
// The block structure and the controller follow the design description; the LFSR
// length and polynomial, the pattern bit assignment and the ROM format are this
// design's choices. ROM_FILE must hold the responses for the chosen LFSR settings.
module lp_bist_alu
  import bist_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 25,
  parameter int unsigned LFSR_TAP     = 19,
  parameter string       ROM_FILE     = "rtl/bist_rom.hex"
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ALU_W-1:0] nop1,
  input  logic [ALU_W-1:0] nop2,
  input  logic [SEL_W-1:0] nsel,
  input  logic             ncin,
  output logic [ALU_W-1:0] y1,
  output logic             test
);

  localparam int unsigned LFSR_N = PATTERN_W;
  localparam int unsigned CNT_W  = $clog2(NUM_PATTERNS + 1);
  localparam int unsigned AW     = $clog2(NUM_PATTERNS);

  logic                lclk, lrst, mux_sel, demux_sel, latch_clk, eq;
  logic [CNT_W-1:0]    address;
  logic [LFSR_N-1:0]   lfsr_q, lfsr_en;
  logic                lfsr_u1;
  alu_in_t             normal_in, pattern_in, alu_in;
  logic [ALU_W-1:0]    alu_y, y_test, qout, dout;

  bist_controller #(
    .NUM_PATTERNS (NUM_PATTERNS),
    .CNT_W        (CNT_W)
  ) u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .cmp_in    (eq),
    .lclk      (lclk),
    .lrst      (lrst),
    .mux_sel   (mux_sel),
    .demux_sel (demux_sel),
    .latch_clk (latch_clk),
    .address   (address),
    .test      (test)
  );

  lp_lfsr #(
    .N   (LFSR_N),
    .TAP (LFSR_TAP)
  ) u_tpg (
    .clk  (clk),
    .rst  (rst),
    .lrst (lrst),
    .step (lclk),
    .q    (lfsr_q),
    .en   (lfsr_en),
    .u1   (lfsr_u1)
  );

  always_comb begin
    normal_in     = '{sel: alu_op_e'(nsel), cin: ncin, b: nop2, a: nop1};
    pattern_in    = alu_in_t'(lfsr_q);
  end

  input_mux u_mux (
    .test_mode (mux_sel),
    .normal    (normal_in),
    .pattern   (pattern_in),
    .alu_in    (alu_in)
  );

  alu #(.W(ALU_W)) u_alu (
    .a   (alu_in.a),
    .b   (alu_in.b),
    .cin (alu_in.cin),
    .sel (alu_in.sel),
    .y   (alu_y)
  );

  demux #(.W(ALU_W)) u_demux (
    .test_mode (demux_sel),
    .d         (alu_y),
    .y_normal  (y1),
    .y_test    (y_test)
  );

  hold_latch #(.W(ALU_W)) u_latch (
    .clk  (clk),
    .rst  (rst),
    .load (latch_clk),
    .d    (y_test),
    .q    (qout)
  );

  bist_rom #(
    .W         (ALU_W),
    .AW        (AW),
    .INIT_FILE (ROM_FILE)
  ) u_rom (
    .clk  (clk),
    .addr (address[AW-1:0]),
    .dout (dout)
  );

  comparator #(.W(ALU_W)) u_cmp (
    .qout (qout),
    .dout (dout),
    .eq   (eq)
  );

endmodule
