// Linear sorter: a chain of N Comparison Units (CU 0 on the left holds the
// smallest value). Each CU sees the broadcast input, its left neighbour's
// pair and LESS_OUT, and its right neighbour's data and boundary bit; CU 0
// has no left and CU N-1 no right neighbour. Flags of all CUs come out as
// N-bit words (bit i = CU i).
//
// Two read multiplexers are added around the chain: sel_id is the index held
// by the CU picked by the one-hot word sel (an AND-OR mux, used to find the
// character to substitute), and rd_id is the index held by CU rd_idx (used
// to read the sorted result). Both are combinational.
module lsbwt_cu_array #(
  parameter int unsigned N      = lsbwt_pkg::DEF_N,
  parameter int unsigned DATA_W = lsbwt_pkg::DEF_DATA_W,
  localparam int unsigned ID_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              clear,
  input  logic [N-1:0]      en,
  input  logic [N-1:0]      set_max,
  input  logic              capture,
  input  logic [DATA_W:0]   data_in,
  input  logic [ID_W-1:0]   id_in,
  input  logic [N-1:0]      sel,
  output logic [ID_W-1:0]   sel_id,
  input  logic [ID_W-1:0]   rd_idx,
  output logic [ID_W-1:0]   rd_id,
  output logic [N-1:0]      eql,
  output logic [N-1:0]      sust,
  output logic [N-1:0]      less,
  output logic [DATA_W:0]   data [N],
  output logic [ID_W-1:0]   ids  [N]
);

  logic [N-1:0] eqr;
  logic [N-1:0] bound;

  for (genvar i = 0; i < N; i++) begin : g_cu
    localparam int L = (i == 0) ? 0 : i - 1;
    localparam int R = (i == N - 1) ? N - 1 : i + 1;
    lsbwt_cu #(.DATA_W(DATA_W), .ID_W(ID_W)) u_cu (
      .clk         (clk),
      .clear       (clear),
      .en          (en[i]),
      .set_max     (set_max[i]),
      .capture     (capture),
      .data_in     (data_in),
      .id_in       (id_in),
      .left_valid  (i != 0),
      .left_data   (data[L]),
      .left_id     (ids[L]),
      .less_in     ((i != 0) && less[L]),
      .right_valid (i != N - 1),
      .right_data  (data[R]),
      .right_bound (bound[R]),
      .less_out    (less[i]),
      .eql         (eql[i]),
      .eqr         (eqr[i]),
      .sust        (sust[i]),
      .data_now    (data[i]),
      .id_now      (ids[i]),
      .bound_now   (bound[i])
    );
  end

  always_comb begin
    sel_id = '0;
    for (int i = 0; i < N; i++)
      sel_id |= sel[i] ? ids[i] : '0;
  end

  assign rd_id = ids[rd_idx];

endmodule
