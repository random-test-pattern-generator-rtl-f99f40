// dcm_b: DCM-B, the divide-by-3 clock source of the beat-frequency detector.
//
// Two JK flip-flops, A and B, with both K inputs tied high, step through the
// states (QA,QB) = 00 -> 10 -> 01 -> 00. The J inputs are JA = not QB and
// JB = QA, the equations that give this sequence with K = 1; the output is
// QA OR QB, which is high for two input clocks out of three. Two JK flip-flops,
// the OR gate, the inverter, K tied high and QA's cycle 0 1 0 follow the
// design description; the J equations are derived here from that sequence.
// The enable is the DCM-B DRP signal: while it is low both flip-flops are
// held at 0 (this design's choice), so the output rises on the first clock
// after enable. Timing: the output is an OR of two registers, low after reset.
module dcm_b (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic clk_div3
);

  logic qa, qb;
  logic ja, jb;

  localparam logic KA = 1'b1;  // tied high
  localparam logic KB = 1'b1;  // tied high

  // JK flip-flop next state: Q+ = J & ~Q | ~K & Q
  function automatic logic jk_next(input logic j, input logic k, input logic q);
    return (j & ~q) | (~k & q);
  endfunction

  assign ja = ~qb;
  assign jb = qa;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qa <= 1'b0;
      qb <= 1'b0;
    end else if (en) begin
      qa <= jk_next(ja, KA, qa);
      qb <= jk_next(jb, KB, qb);
    end else begin
      qa <= 1'b0;
      qb <= 1'b0;
    end
  end

  assign clk_div3 = qa | qb;

endmodule
