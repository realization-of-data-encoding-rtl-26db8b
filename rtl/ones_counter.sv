// "Ones" block: counts the set bits of an N-bit detector vector. The output has
// $clog2(N+1) bits, which is lg w bits for the w-1 pairs of a w-line link, as in
// the published encoder diagrams. Combinational, written as a plain adder chain
// and left to synthesis to balance.
module ones_counter #(
  parameter int N  = 31,
  parameter int CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits_in,
  output logic [CW-1:0] count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < N; i++) count = count + CW'(bits_in[i]);
  end
endmodule
