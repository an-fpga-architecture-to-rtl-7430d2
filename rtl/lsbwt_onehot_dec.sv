// One-hot decoder: turns the priority encoder's position into an N-bit word
// with only that bit set, or all zeros when valid is low. Combinational.
module lsbwt_onehot_dec #(
  parameter int unsigned N = lsbwt_pkg::DEF_N,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [IDX_W-1:0] idx,
  input  logic             valid,
  output logic [N-1:0]     onehot
);

  always_comb begin
    onehot = '0;
    for (int i = 0; i < N; i++)
      onehot[i] = valid && (idx == IDX_W'(i));
  end

endmodule
