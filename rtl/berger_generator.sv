// berger_generator: Berger check-bit generator.
//
// The Berger check symbol of an I-bit information word is the number of
// zeros in it, written on K = ceil(log2(I+1)) bits. This generator inverts the
// information bits and counts the ones of the result with a full/half adder
// tree (ones_counter). For a maximal-length word, I = 2^K - 1, the tree is
// made only of full adders (four of them for I = 7, K = 3); otherwise half
// adders fill the gaps. Purely combinational.
module berger_generator
  import tsc_pkg::*;
#(
  parameter int unsigned I = 7,                       // information bits
  localparam int unsigned K = tsc_pkg::berger_bits(I) // check bits
) (
  input  logic [I-1:0] info,
  output logic [K-1:0] check
);

  ones_counter #(.N(I)) u_cnt (.x(~info), .cnt(check));

endmodule
