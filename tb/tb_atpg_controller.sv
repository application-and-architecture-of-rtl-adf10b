// tb_atpg_controller: runs sessions through the controller with a small
// NUM_PATTERNS and checks the control sequence and its cycle counts
// (1 load clock, NUM_PATTERNS step clocks with pattern index 0..N-1,
// 1 check clock), the interrupt on a failing TPA result, its sticky
// behaviour, intr_clear_i, done until en drops, and reset.
module tb_atpg_controller;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, intr_clear_i = 0, tpa_valid = 0, tpa_fail = 0;
  logic load, step, check, busy, done, intr_o;
  logic [2:0] pat_idx;

  atpg_controller #(.NUM_PATTERNS(N)) dut (.*);

  always #5 clk = ~clk;

  // TPA model: registered result one clock after check
  logic fail_next = 0;
  always_ff @(posedge clk) begin
    tpa_valid <= check;
    if (check) tpa_fail <= fail_next;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session(bit make_fail);
    int loads = 0, steps = 0, checks_seen = 0, cyc = 0, first_check = -1;
    fail_next = make_fail;
    en = 1;
    while (!done && cyc < 100) begin
      @(posedge clk); #1; cyc++;
      if (load) loads++;
      if (step) begin
        checks++;
        if (pat_idx !== 3'(steps)) failures++;
        steps++;
      end
      if (check) begin checks_seen++; first_check = cyc; end
    end
    checks++; if (loads != 1) begin failures++; $display("loads %0d", loads); end
    checks++; if (steps != N) begin failures++; $display("steps %0d", steps); end
    checks++; if (checks_seen != 1) failures++;
    checks++; if (first_check != N + 2) begin failures++; $display("check at %0d", first_check); end
    checks++; if (cyc != N + 3) begin failures++; $display("done at %0d", cyc); end
    @(posedge clk); #1;
    checks++; if (intr_o !== make_fail) begin failures++; $display("intr %b", intr_o); end
    checks++; if (!done) failures++;
    en = 0; @(posedge clk); #1;
    checks++; if (done || busy) failures++;
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    checks++; if (busy || done || intr_o) failures++;
    session(0);
    session(1);
    // interrupt is sticky while idle, cleared by intr_clear_i
    repeat (3) @(posedge clk); #1;
    checks++; if (intr_o !== 1) failures++;
    intr_clear_i = 1; @(posedge clk); #1 intr_clear_i = 0;
    checks++; if (intr_o !== 0) failures++;
    session(1);
    // a new session clears a pending interrupt at load
    fail_next = 0; en = 1;
    repeat (2) @(posedge clk); #1;
    checks++; if (intr_o !== 0) failures++;
    rst = 1; @(posedge clk); #1 rst = 0; en = 0;
    checks++; if (busy || done) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
