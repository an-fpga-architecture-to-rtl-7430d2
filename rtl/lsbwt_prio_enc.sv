// Priority encoder: returns the position of the first set bit of req, scanning
// from bit 0 (the leftmost CU) upwards, and valid when any bit is set. Purely
// combinational. Its function is that of the architecture's priority encoder
// over the stored SUST flags; the loop form is this design's.
module lsbwt_prio_enc #(
  parameter int unsigned N = lsbwt_pkg::DEF_N,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]     req,
  output logic [IDX_W-1:0] idx,
  output logic             valid
);

  always_comb begin
    idx   = '0;
    valid = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        idx   = IDX_W'(i);
        valid = 1'b1;
      end
    end
  end

endmodule
