// mt_creg: configuration register of a MUXTREE element.
//
// A W-bit shift register. While shift_en is high it takes one bit per clock
// from si into the top bit, moves every bit one place down and presents the
// bottom bit on so, so a stream is loaded bottom-bit first. While shift_en is
// low it holds its contents, which configure the element through q.
// The register is cleared by the asynchronous active-low reset, so that the
// built-in chain test (mt_chain_check) starts from an all-zero register.
// The shift-register form is the document's; the shift direction, bit order
// and the reset are choices of this design.
module mt_creg #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift_en,
  input  logic         si,
  output logic [W-1:0] q,
  output logic         so
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {si, q[W-1:1]};
  end

  assign so = q[0];

endmodule
