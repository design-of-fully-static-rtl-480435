// pulse_shift_register -- one-shot pulse generator and N-stage select chain.
//
// This is the select register of the image sensor. A reset starts it, and one
// logic-1 pulse then walks from stage 0 to stage N-1, one stage per clock.
// Each stage drives the select line of one pixel column (or row).
//
// How it works: a pulse-generation flip-flop sits in front of the chain with
// its D tied high. Reset clears it, and the first clock sets it; it then stays
// high. Its outputs feed stage 0 crossed over (QB -> D, Q -> DB), so stage 0
// captures the complement of that step. It is 1 for exactly one clock, and the
// plain Q->D / QB->DB links between the later stages carry that one pulse to
// the end. Once it has left stage N-1 the chain stays empty until the next
// reset. Every stage, the pulse generator included, is a cvsl_dff.
//
// Interface: clk, active-low rst_n, sel[N-1:0] (the Q outputs, one-hot while
// the pulse travels), last (= sel[N-1], the end-of-chain signal taken to a
// pad) and last_b (its complement, for a differential load).
//
// Timing: with rst_n released before rising edge 1, sel[k] is high from edge
// k+1 to edge k+2. So last is high for the clock after edge N. N = 128 and
// the crossed link to stage 0 follow the source design. The tied-high D of the
// pulse generator is this design's reading of it.
module pulse_shift_register #(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] sel,
  output logic         last,
  output logic         last_b
);

  logic         gen_q, gen_qb;
  logic [N-1:0] q, qb;

  // Pulse generator: low after reset, high from the first clock on.
  cvsl_dff u_gen (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (1'b1),
    .db   (1'b0),
    .q    (gen_q),
    .qb   (gen_qb)
  );

  // Stage 0 is cross-connected to the generator, which turns its single
  // step into a single one-clock pulse.
  cvsl_dff u_stage0 (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (gen_qb),
    .db   (gen_q),
    .q    (q[0]),
    .qb   (qb[0])
  );

  for (genvar k = 1; k < N; k++) begin : g_stage
    cvsl_dff u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (q[k-1]),
      .db   (qb[k-1]),
      .q    (q[k]),
      .qb   (qb[k])
    );
  end

  assign sel    = q;
  assign last   = q[N-1];
  assign last_b = qb[N-1];

  // At most one stage is selected at any time.
  a_one_hot : assert property (@(posedge clk) $onehot0(q))
    else $error("pulse_shift_register: more than one stage selected");

endmodule
