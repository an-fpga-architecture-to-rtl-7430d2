// Prefix unit: for each sorted index i read out, forms the prefix
// i_p = (i - 1) mod N (the index of the character in front of the rotation),
// which addresses the string memory to give the BWT character. It flags the
// row whose index is 0 (the row of the original string) and latches that
// row's position as primary_idx, the number needed to invert the transform.
// prefix and primary are combinational; primary_idx is registered.
module lsbwt_prefix_out #(
  parameter int unsigned N = lsbwt_pkg::DEF_N,
  localparam int unsigned ID_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            clear,
  input  logic            valid,     // a sorted row is presented
  input  logic [ID_W-1:0] row,       // its position in sorted order
  input  logic [ID_W-1:0] id,        // its index
  output logic [ID_W-1:0] prefix,
  output logic            primary,
  output logic [ID_W-1:0] primary_idx
);

  assign prefix  = (id == '0) ? ID_W'(N - 1) : id - 1'b1;
  assign primary = valid && (id == '0);

  always_ff @(posedge clk) begin
    if (clear)        primary_idx <= '0;
    else if (primary) primary_idx <= row;
  end

endmodule
