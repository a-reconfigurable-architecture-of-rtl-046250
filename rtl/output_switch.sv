// output_switch: the switch at the turbo encoder's output that turns each
// encoded triple into a serial bit stream.
//
// For every trellis step the systematic bit S, then parity P1, then parity P2
// leave on one line, so a block of K bits becomes 3K serial bits (rate 1/3).
// The published encoder diagram shows S, P1 and P2 switched onto a single
// "Data Out" line; the S, P1, P2 order and the handshakes are this design's
// choice.
//
// Interface and timing: upstream valid/ready carries one triple (in_sys,
// in_p1, in_p2, in_last); downstream valid/ready carries one bit. A triple is
// taken (in_ready high) in the cycle its third bit is taken, so with out_ready
// held high one bit leaves per clock and a triple is consumed every three
// clocks. out_last marks the P2 bit of the triple flagged in_last.
module output_switch (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_sys,
  input  logic in_p1,
  input  logic in_p2,
  input  logic in_last,
  output logic in_ready,
  output logic out_valid,
  output logic out_bit,
  output logic out_last,
  input  logic out_ready
);

  typedef enum logic [1:0] {SEL_S, SEL_P1, SEL_P2} sel_e;
  sel_e sel_q;

  assign out_valid = in_valid;
  assign in_ready  = out_ready && (sel_q == SEL_P2);
  assign out_last  = in_last && (sel_q == SEL_P2);

  always_comb begin
    unique case (sel_q)
      SEL_S:   out_bit = in_sys;
      SEL_P1:  out_bit = in_p1;
      default: out_bit = in_p2;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= SEL_S;
    else if (out_valid && out_ready) begin
      unique case (sel_q)
        SEL_S:   sel_q <= SEL_P1;
        SEL_P1:  sel_q <= SEL_P2;
        default: sel_q <= SEL_S;
      endcase
    end
  end

endmodule
