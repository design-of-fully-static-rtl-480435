// test_cells -- stand-alone test structures placed beside the scan chain.
//
// These give direct access to the flip-flop cell and to the output driver so
// the cell can be characterised apart from the sensor:
//   * tff1: a cvsl_dff whose outputs leave through buffers that can drive a
//     large pad load. It has three buffered outputs: tff1_out[0] = Q,
//     tff1_out[1] = QB, tff1_out[2] = Q (a second copy for a probe).
//   * tff2: a cvsl_dff whose Q and QB drive their pads with no buffer.
//   * tinv: a single buffer inverter, tinv_y = ~tinv_a.
// The three structures and the buffer inverter come from the source design.
// Which signals the three buffered outputs carry is this design's choice. A
// buffer is a logical identity here, because drive strength is not modelled.
//
// Timing: both flip-flops sample on the rising edge of their own clock, with
// asynchronous active-low reset (see cvsl_dff). The inverter is combinational.
module test_cells (
  input  logic       tff1_clk,
  input  logic       tff1_rst_n,
  input  logic       tff1_d,
  input  logic       tff1_db,
  output logic [2:0] tff1_out,
  input  logic       tff2_clk,
  input  logic       tff2_rst_n,
  input  logic       tff2_d,
  input  logic       tff2_db,
  output logic       tff2_q,
  output logic       tff2_qb,
  input  logic       tinv_a,
  output logic       tinv_y
);

  logic tff1_q, tff1_qb;

  cvsl_dff u_tff1 (
    .clk  (tff1_clk),
    .rst_n(tff1_rst_n),
    .d    (tff1_d),
    .db   (tff1_db),
    .q    (tff1_q),
    .qb   (tff1_qb)
  );

  // Output buffers of the first test flip-flop.
  assign tff1_out = {tff1_q, tff1_qb, tff1_q};

  cvsl_dff u_tff2 (
    .clk  (tff2_clk),
    .rst_n(tff2_rst_n),
    .d    (tff2_d),
    .db   (tff2_db),
    .q    (tff2_q),
    .qb   (tff2_qb)
  );

  assign tinv_y = ~tinv_a;

endmodule
