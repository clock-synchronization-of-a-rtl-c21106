// sync_node -- the synchronization circuitry of one clock C_s (Blocks A to D in a chain).
//
// Block A (clock_input) time-stamps the first tick of each of the n input clocks in every
// global clock cycle, Block B (tick_sorter) sorts the time stamps into the tick sequence,
// Block C (ref_selector) picks the reference clock from the own clock's position in that
// sequence, and Block D (freq_adjust) pulls the local oscillator towards the reference. The
// own clock C_s is input SELF_ID of Blocks A and C; the other n-1 clocks come in on c_other in
// order, skipping that position.
// This design's own addition: every own tick loads the Block A counter with CNT_MOD/2, so the
// gcc boundary (Line A) stays half a local period away from the own tick and the ticks of
// clocks that are in step with it fall inside one gcc; the published circuit leaves the
// counter free-running.
// Timing: the selection made at one Line A steers the reference for the next gcc.
module sync_node
  import clksync_pkg::*;
#(
  parameter int N          = 8,               // n, inputs including the own clock
  parameter int M          = 2,               // m, faults tolerated
  parameter int SELF_ID    = 0,               // position of the own clock among the inputs
  parameter int CNT_MOD    = 33,              // T_gcc / T_hf
  parameter int K          = $clog2(CNT_MOD), // k
  parameter int DRIFT      = 0,               // oscillator model: frequency error
  parameter int INIT_PHASE = 0,               // oscillator model: phase at reset
  parameter int NP         = pow2_ceil(N),
  parameter int IW         = idx_w(NP)
) (
  input  logic                  clk_hf,
  input  logic                  rst_n,
  input  logic [N-2:0]          c_other,   // the other n-1 input clocks
  output logic                  c_s,       // the synchronized local clock
  output logic                  ref_sig,   // reference signal chosen by Block C
  output logic                  line_a,    // start of a gcc at this node
  output logic [N-1:0]          ticked,    // Block A flip-flops
  output logic [NP-1:0][IW-1:0] seq_id,    // tick sequence (IDs)
  output rule_e                 rule,      // reference rule in force
  output logic [IW:0]           own_pos,   // x of the last gcc
  output logic signed [15:0]    phase_err, // Block D phase error
  output logic                  err_valid
);

  logic [N-1:0]          c_all;
  logic [K-1:0]          counter;
  logic [N-1:0][K-1:0]   count_r;
  logic [NP-1:0][K-1:0]  seq_cnt;
  logic [IW-1:0]         ref_id;
  logic                  tick;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (i < SELF_ID)       c_all[i] = c_other[i];
      else if (i == SELF_ID) c_all[i] = c_s;
      else                   c_all[i] = c_other[i-1];
    end
  end

  clock_input #(.N(N), .CNT_MOD(CNT_MOD), .K(K), .ALIGN_VALUE(CNT_MOD / 2)) u_blk_a (
    .clk_hf, .rst_n, .c_in(c_all), .align(tick),
    .counter, .line_a, .ticked, .count_o(count_r));

  tick_sorter #(.N(N), .W(K), .NP(NP), .IW(IW)) u_blk_b (
    .count_i(count_r), .seq_cnt, .seq_id);

  ref_selector #(.N(N), .M(M), .SELF_ID(SELF_ID), .NP(NP), .IW(IW)) u_blk_c (
    .clk_hf, .rst_n, .line_a, .seq_id, .c_in(c_all), .ref_sig, .rule, .ref_id, .own_pos);

  freq_adjust #(.CNT_MOD(CNT_MOD), .DRIFT(DRIFT), .INIT_PHASE(INIT_PHASE)) u_blk_d (
    .clk_hf, .rst_n, .ref_sig, .c_s, .tick, .phase_err, .err_valid);

endmodule
