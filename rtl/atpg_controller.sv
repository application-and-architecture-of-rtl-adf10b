// atpg_controller: test session controller.
//
// One input starts the work (en) and one output reports it (intr_o). A
// session runs IDLE -> LOAD -> RUN -> CHECK -> DONE:
//   LOAD  (1 clock)            load the Gray-coded seed, clear MISRs, TPAs
//                              and the FIR delay line, clear the interrupt;
//   RUN   (NUM_PATTERNS clocks) step = 1: the LFSR advances one pattern per
//                              clock, the MISRs absorb one response per
//                              clock and pattern number pat_idx is written
//                              to the pattern memory (mem_we);
//   CHECK (1 clock)            check = 1: the TPAs compare signatures;
//   DONE                       when the TPA result arrives (tpa_valid) the
//                              interrupt is set if any TPA reports a
//                              mismatch; done stays high until en is low.
// intr_o = 1 means a signature mismatch (faulty CUT), 0 a good one; it is
// sticky until intr_clear_i or the next session. From en high in IDLE to
// tpa_valid takes NUM_PATTERNS + 3 clocks. The enable/interrupt interface and
// the polarity follow the controller description; the state sequence,
// timing and the clear input are this design's choices. Synchronous
// active-high reset.
module atpg_controller
  import atpg_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 64,
  localparam int unsigned AW = $clog2(NUM_PATTERNS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          intr_clear_i,
  input  logic          tpa_valid,
  input  logic          tpa_fail,
  output logic          load,
  output logic          step,
  output logic          check,
  output logic [AW-1:0] pat_idx,
  output logic          busy,
  output logic          done,
  output logic          intr_o
);
  ctrl_state_t state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ST_IDLE;
      pat_idx <= '0;
      intr_o  <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE:  if (en) state <= ST_LOAD;
        ST_LOAD: begin
          pat_idx <= '0;
          intr_o  <= 1'b0;
          state   <= ST_RUN;
        end
        ST_RUN: begin
          pat_idx <= pat_idx + 1'b1;
          if (pat_idx == AW'(NUM_PATTERNS - 1)) state <= ST_CHECK;
        end
        ST_CHECK: state <= ST_DONE;
        ST_DONE:  if (!en) state <= ST_IDLE;
        default:  state <= ST_IDLE;
      endcase
      if (tpa_valid && tpa_fail) intr_o <= 1'b1;
      else if (intr_clear_i && state != ST_LOAD) intr_o <= 1'b0;
    end
  end

  always_comb begin
    load  = (state == ST_LOAD);
    step  = (state == ST_RUN);
    check = (state == ST_CHECK);
    busy  = (state == ST_LOAD) || (state == ST_RUN) || (state == ST_CHECK);
    done  = (state == ST_DONE);
  end

  // At most one of the session strobes is active in any clock.
  a_strobes_exclusive: assert property (@(posedge clk) disable iff (rst)
    (32'(load) + 32'(step) + 32'(check)) <= 1);
  // A session applies exactly NUM_PATTERNS patterns: RUN is left only after
  // the last pattern number.
  a_run_length: assert property (@(posedge clk) disable iff (rst)
    (state == ST_RUN && pat_idx != AW'(NUM_PATTERNS - 1)) |=> state == ST_RUN);
endmodule
