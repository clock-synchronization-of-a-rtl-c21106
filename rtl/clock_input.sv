// clock_input -- Block A, the clock input circuitry of one synchronization node.
//
// Time-stamps the first tick of every input clock within a global clock cycle (gcc). A
// k-bit counter, clocked by the high-frequency clock clk_hf, counts 0..CNT_MOD-1 and wraps;
// CNT_MOD = T_gcc / T_hf, so it runs through all its states once per gcc. Each input clock
// C_i has a set-only flip-flop whose D input is C_i OR Q: at an active clk_hf edge a high C_i
// sets it and it stays set for the rest of the gcc, so a faulty clock cannot produce a second
// tick in the same cycle. The edge that sets the flip-flop also loads the current counter value
// into the k-bit register of that input, so register i holds the arrival time of clock i;
// equal values mean arrival within the same clk_hf period.
//
// Line A (line_a) is high while the counter is 0; it marks the start of a gcc. During it all
// flip-flops are cleared and all registers preset to all ones (a clock that never ticks thus
// looks slowest); a tick during that one clk_hf period is not recorded. Line A is also the load
// strobe of Block C, which at that edge still sees the counts of the cycle that just ended.
//
// Timing: counts appear one clk_hf edge after the tick is sampled and are held until the next
// Line A. The counter, flip-flops and registers follow the published circuit. This design adds
// the align input: it loads ALIGN_VALUE into the counter, so the node can hold its gcc boundary
// half a period away from its own clock's tick (see sync_node). Tied low it has no effect.
// The inputs are sampled directly as in the published circuit; clocks that are asynchronous to
// clk_hf need a synchronizer in front of this block in a real implementation.
module clock_input #(
  parameter int N           = 8,                  // n, inputs including the own clock
  parameter int CNT_MOD     = 33,                 // counter modulo T_gcc / T_hf
  parameter int K           = $clog2(CNT_MOD),    // k, counter and register width
  parameter int ALIGN_VALUE = CNT_MOD / 2         // counter value loaded by align
) (
  input  logic                clk_hf,
  input  logic                rst_n,
  input  logic [N-1:0]        c_in,      // the input clocks C_1..C_n
  input  logic                align,     // load ALIGN_VALUE into the counter
  output logic [K-1:0]        counter,   // high-frequency counter value
  output logic                line_a,    // start of a global clock cycle (counter == 0)
  output logic [N-1:0]        ticked,    // input flip-flops: clock i has ticked in this gcc
  output logic [N-1:0][K-1:0] count_o    // k-bit registers: arrival count of each clock
);

  assign line_a = (counter == '0);

  always_ff @(posedge clk_hf or negedge rst_n) begin
    if (!rst_n) begin
      counter <= '0;
    end else if (align) begin
      counter <= K'(ALIGN_VALUE);
    end else if (counter == K'(CNT_MOD - 1)) begin
      counter <= '0;
    end else begin
      counter <= counter + 1'b1;
    end
  end

  always_ff @(posedge clk_hf or negedge rst_n) begin
    if (!rst_n) begin
      ticked  <= '0;
      count_o <= '1;
    end else if (line_a) begin
      ticked  <= '0;
      count_o <= '1;
    end else begin
      for (int i = 0; i < N; i++) begin
        ticked[i] <= ticked[i] | c_in[i];
        if (c_in[i] && !ticked[i]) count_o[i] <= counter;
      end
    end
  end

  initial begin
    assert (CNT_MOD >= 2 && CNT_MOD < (1 << K))
      else $error("clock_input: CNT_MOD must fit below the all-ones preset value");
  end

endmodule
