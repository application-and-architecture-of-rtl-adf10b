// tb_lp_atpg_top: end-to-end test of the low-power ATPG system at its
// default size (10-bit patterns, 64 patterns per session).
//
// For a seed the testbench computes, from reference models only, the
// pattern stream (Gray-coded seed, then XOR feedback), the half-adder and
// FIR responses and both MISR signatures, good and with each injected
// fault. It then runs sessions:
//   1. fault-free CUTs and correct reference signatures: no interrupt;
//   2. stuck-at fault in the half adder: interrupt, half-adder TPA only;
//   3. stuck-at fault in the FIR filter: interrupt, FIR TPA only;
//   4. interrupt cleared by intr_clear_i;
// and checks every pattern, both CUT responses, the signatures, the
// session length (NUM_PATTERNS + 3 clocks to the result) and the contents
// of both memory banks. Each mechanism (Gray seed load, pattern step,
// signature compaction, mismatch interrupt, interrupt clear, two-bank read)
// is counted; one that never happens counts as a failure.
module tb_lp_atpg_top;
  import atpg_ref_pkg::*;
  localparam int N = 64;
  localparam int unsigned TAPS = 10'h201;

  int checks = 0, failures = 0;
  int n_gray_load = 0, n_step = 0, n_compact = 0, n_intr = 0, n_clear = 0, n_bank_read = 0, n_pass = 0;

  logic clk = 0, rst = 1, en = 0, intr_clear_i = 0, fault_ha = 0, fault_fir = 0;
  logic [9:0] seed = '0, golden_sig_ha = '0, golden_sig_fir = '0;
  logic [4:0] mem_raddr = '0;
  logic intr_o, done, busy, tpa_ha, tpa_fir;
  logic [9:0] lfsr_o, cut_ha_o, cut_fir_o, misr_ha_o, misr_fir_o, mem_data_out1, mem_data_out2;

  lp_atpg_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned pat [N];
  int unsigned ha_resp [N], fir_resp [N];

  // Reference: patterns and responses; signatures with optional faults.
  task automatic build_model(int unsigned s);
    int unsigned p = ref_gray(s, 10);
    for (int i = 0; i < N; i++) begin
      pat[i] = p;
      ha_resp[i] = ref_ha(p, 10);
      fir_resp[i] = ref_fir(p, i > 0 ? pat[i-1] : 0, i > 1 ? pat[i-2] : 0,
                            i > 2 ? pat[i-3] : 0, i > 3 ? pat[i-4] : 0);
      p = ref_lfsr_next(p, TAPS, 10);
    end
  endtask

  function automatic int unsigned sig_of(bit fir, bit faulty);
    int unsigned m = 0, r;
    for (int i = 0; i < N; i++) begin
      r = fir ? fir_resp[i] : ha_resp[i];
      if (faulty) r = fir ? (r & ~32'h1) : (r & ~32'h20);
      m = ref_misr_next(m, r, 0, 10);
    end
    return m;
  endfunction

  task automatic session(bit f_ha, bit f_fir, output logic got_intr);
    int cyc = 0, idx = 0;
    bit exp_ha, exp_fir;
    fault_ha = f_ha; fault_fir = f_fir;
    en = 1;
    @(posedge clk); #1;    // IDLE -> LOAD
    @(posedge clk); #1;    // LOAD -> RUN, first pattern present
    cyc = 2;
    checks++;
    if (lfsr_o === 10'(ref_gray(seed, 10))) n_gray_load++;
    else begin failures++; $display("first pattern %b", lfsr_o); end
    while (busy && cyc < 200) begin
      if (dut.step) begin
        checks++;
        if (lfsr_o !== 10'(pat[idx])) begin failures++; $display("pat %0d %b exp %b", idx, lfsr_o, 10'(pat[idx])); end
        checks++;
        if (cut_ha_o !== 10'(f_ha ? (ha_resp[idx] & ~32'h20) : ha_resp[idx])) failures++;
        checks++;
        if (cut_fir_o !== 10'(f_fir ? (fir_resp[idx] & ~32'h1) : fir_resp[idx])) failures++;
        n_step++;
        idx++;
      end
      @(posedge clk); #1; cyc++;
    end
    checks++; if (idx != N) begin failures++; $display("steps %0d", idx); end
    checks++; if (misr_ha_o !== 10'(sig_of(0, f_ha)))  failures++;
    checks++; if (misr_fir_o !== 10'(sig_of(1, f_fir))) failures++;
    if (misr_ha_o != '0 && misr_fir_o != '0) n_compact++;
    @(posedge clk); #1; cyc++;  // TPA result -> interrupt register
    // N + 3 clocks from en seen to the interrupt being valid (plus the idle clock)
    checks++; if (cyc != N + 4) begin failures++; $display("cycles %0d", cyc); end
    exp_ha = (10'(sig_of(0, f_ha)) != golden_sig_ha);
    exp_fir = (10'(sig_of(1, f_fir)) != golden_sig_fir);
    checks++; if (tpa_ha !== exp_ha || tpa_fir !== exp_fir) begin
      failures++; $display("tpa %b %b exp %b %b", tpa_ha, tpa_fir, exp_ha, exp_fir);
    end
    checks++; if (intr_o !== (exp_ha | exp_fir)) failures++;
    checks++; if (!done) failures++;
    got_intr = intr_o;
    en = 0; @(posedge clk); #1;
  endtask

  initial begin
    logic intr;
    @(posedge clk); #1 rst = 0;
    for (int s = 0; s < 3; s++) begin
      seed = (s == 0) ? 10'b0100101011 : 10'($urandom_range(1, 1023));
      build_model(seed);
      golden_sig_ha = 10'(sig_of(0, 0));
      golden_sig_fir = 10'(sig_of(1, 0));
      if (s == 0) begin
        // hand-computed reference for seed 0100101011: first pattern
        // 0110111110, signatures 0x301 (half adder) and 0x343 (FIR)
        checks++;
        if (pat[0] != 'b0110111110 || golden_sig_ha != 10'h301 || golden_sig_fir != 10'h343) begin
          failures++; $display("reference signatures %h %h", golden_sig_ha, golden_sig_fir);
        end
      end

      session(0, 0, intr);
      checks++; if (intr !== 0) failures++; else n_pass++;

      // memory: bank 1 even patterns, bank 2 odd patterns
      for (int r = 0; r < N / 2; r++) begin
        mem_raddr = 5'(r); @(posedge clk); #1;
        checks++;
        if (mem_data_out1 === 10'(pat[2*r]) && mem_data_out2 === 10'(pat[2*r+1])) n_bank_read++;
        else failures++;
      end

      session(1, 0, intr);
      if (intr) n_intr++;
      checks++; if (tpa_fir !== 0) failures++;
      // interrupt holds after en drops, then intr_clear_i clears it
      checks++; if (intr_o !== intr) failures++;
      intr_clear_i = 1; @(posedge clk); #1 intr_clear_i = 0;
      checks++; if (intr_o !== 0) failures++; else if (intr) n_clear++;

      session(0, 1, intr);
      if (intr) n_intr++;
      checks++; if (tpa_ha !== 0) failures++;
      intr_clear_i = 1; @(posedge clk); #1 intr_clear_i = 0;
    end
    $display("mechanisms: gray_load=%0d steps=%0d compact=%0d pass=%0d intr=%0d clear=%0d bank_read=%0d",
             n_gray_load, n_step, n_compact, n_pass, n_intr, n_clear, n_bank_read);
    checks++; if (n_gray_load == 0) failures++;
    checks++; if (n_step == 0) failures++;
    checks++; if (n_compact == 0) failures++;
    checks++; if (n_pass == 0) failures++;
    checks++; if (n_intr == 0) failures++;
    checks++; if (n_clear == 0) failures++;
    checks++; if (n_bank_read == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
