// lp_atpg_top: low-power ATPG system with two circuits under test.
//
// One low-power LFSR (Gray-coded seed, XOR feedback) generates a stream of
// W-bit pseudo-random test patterns, one per clock. The same pattern drives
// two circuits under test side by side: a bank of half adders and a 5-tap
// low-pass FIR filter. Each CUT's response is compacted by its own MISR, and
// at the end of the session a TPA per CUT compares the signature with the
// expected fault-free one. The controller sequences the session from en and
// raises intr_o when either TPA reports a mismatch. Every pattern is also
// written to a two-bank pattern memory that can be read back two patterns at
// a time.
//
// Timing: a session started by en takes 1 load clock, NUM_PATTERNS run
// clocks, 1 check clock, and the interrupt is valid 1 clock later
// (NUM_PATTERNS + 3 clocks after en is seen); done then stays high until en
// is low. golden_sig_ha / golden_sig_fir are the fault-free signatures for
// the chosen seed; fault_ha / fault_fir inject a stuck-at-0 output fault into
// the corresponding CUT to demonstrate detection.
//
// The block set (controller, memory, LP-LFSR, CUT, MISR, TPA), the Gray
// seed, the half-adder split and the FIR coefficients follow the described
// architecture; running both CUTs in one session, the stored reference
// signatures and the fault ports are this design's choices.
module lp_atpg_top
  import atpg_pkg::*;
#(
  parameter int unsigned W = PAT_W,
  parameter logic [W-1:0] TAPS = LFSR_TAPS,
  parameter int unsigned NUM_PATTERNS = 64,
  localparam int unsigned BAW = $clog2(NUM_PATTERNS / 2)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           en,
  input  logic           intr_clear_i,
  input  logic [W-1:0]   seed,
  input  logic [W-1:0]   golden_sig_ha,
  input  logic [W-1:0]   golden_sig_fir,
  input  logic           fault_ha,
  input  logic           fault_fir,
  input  logic [BAW-1:0] mem_raddr,
  output logic           intr_o,
  output logic           done,
  output logic           busy,
  output logic [W-1:0]   lfsr_o,
  output logic [W-1:0]   cut_ha_o,
  output logic [W-1:0]   cut_fir_o,
  output logic [W-1:0]   misr_ha_o,
  output logic [W-1:0]   misr_fir_o,
  output logic           tpa_ha,
  output logic           tpa_fir,
  output logic [W-1:0]   mem_data_out1,
  output logic [W-1:0]   mem_data_out2
);
  localparam int unsigned AW = $clog2(NUM_PATTERNS);

  logic          load, step, check;
  logic [AW-1:0] pat_idx;
  logic          valid_ha, valid_fir;

  atpg_controller #(.NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk, .rst, .en, .intr_clear_i,
    .tpa_valid(valid_ha | valid_fir),
    .tpa_fail (tpa_ha | tpa_fir),
    .load, .step, .check, .pat_idx, .busy, .done, .intr_o
  );

  lp_lfsr #(.W(W), .TAPS(TAPS)) u_lplfsr (
    .clk, .rst, .seed, .load, .step, .pattern(lfsr_o)
  );

  pattern_memory #(.W(W), .NUM_PATTERNS(NUM_PATTERNS)) u_mem (
    .clk, .we(step), .waddr(pat_idx), .wdata(lfsr_o),
    .raddr(mem_raddr), .rdata1(mem_data_out1), .rdata2(mem_data_out2)
  );

  // Half-adder channel
  half_adder_cut #(.W(W)) u_cut_ha (
    .pattern(lfsr_o), .fault_inject(fault_ha), .response(cut_ha_o)
  );
  misr #(.W(W)) u_misr_ha (
    .clk, .rst, .clear(load), .en(step), .d(cut_ha_o), .sig(misr_ha_o)
  );
  tpa #(.W(W)) u_tpa_ha (
    .clk, .rst, .clear(load), .check, .sig(misr_ha_o), .golden(golden_sig_ha),
    .fail(tpa_ha), .valid(valid_ha)
  );

  // FIR filter channel
  fir_filter #(.W(W)) u_cut_fir (
    .clk, .rst, .clear(load), .step, .x(lfsr_o), .fault_inject(fault_fir),
    .y(cut_fir_o)
  );
  misr #(.W(W)) u_misr_fir (
    .clk, .rst, .clear(load), .en(step), .d(cut_fir_o), .sig(misr_fir_o)
  );
  tpa #(.W(W)) u_tpa_fir (
    .clk, .rst, .clear(load), .check, .sig(misr_fir_o), .golden(golden_sig_fir),
    .fail(tpa_fir), .valid(valid_fir)
  );
endmodule
