// Comparison Unit (CU): one node of the linear sorter.
//
// The CU stores one (data, id) pair. All CUs see the same broadcast input
// (data_in, id_in). An enabled CU raises less_out when data_in < data_now.
// On the clock edge an enabled CU takes its left neighbour's pair when
// less_in is set (the CU to the left is taking the input or shifting, so this
// one shifts right), takes the input pair when only its own less_out is set,
// and otherwise holds. Because the stored values are kept in ascending order,
// this inserts the input at its sorted place in one cycle. Equal values are
// not "less", so a new item goes behind stored items of the same value.
//
// The CU also forms the flags used to find groups of equal characters:
// EQL (equal to the left CU), EQR (equal to the right CU) and SUST = EQL|EQR
// (this CU must be substituted). A boundary bit, updated on each capture,
// records that this CU's earlier keys differed from its left neighbour's;
// EQL/EQR are masked by it so comparisons stay inside a group. The boundary
// bit is this design's way of keeping groups apart; the sorting, the flags and
// the MAX_VALUE parallel load (set_max) follow the architecture description.
//
// Data is DATA_W+1 bits wide: MAX_VALUE = 2**DATA_W marks an empty CU and is
// above every character. clear (synchronous, also driven by reset) empties the
// CU and drops its boundary bit. All outputs except the registers are
// combinational in the current cycle.
module lsbwt_cu #(
  parameter int unsigned DATA_W = lsbwt_pkg::DEF_DATA_W,
  parameter int unsigned ID_W   = $clog2(lsbwt_pkg::DEF_N)
) (
  input  logic              clk,
  input  logic              clear,      // empty the CU (reset / new string)
  input  logic              en,         // enable from the enable multiplexer
  input  logic              set_max,    // parallel load of MAX_VALUE
  input  logic              capture,    // round-end pulse: update boundary bit
  input  logic [DATA_W:0]   data_in,    // DATA_INPUT (broadcast)
  input  logic [ID_W-1:0]   id_in,
  input  logic              left_valid, // a CU exists on the left
  input  logic [DATA_W:0]   left_data,  // DATA_LEFT
  input  logic [ID_W-1:0]   left_id,
  input  logic              less_in,    // LESS_OUT of the left CU
  input  logic              right_valid,
  input  logic [DATA_W:0]   right_data, // DATA_RIGHT
  input  logic              right_bound,// boundary bit of the right CU
  output logic              less_out,
  output logic              eql,
  output logic              eqr,
  output logic              sust,
  output logic [DATA_W:0]   data_now,
  output logic [ID_W-1:0]   id_now,
  output logic              bound_now
);

  localparam logic [DATA_W:0] MAX_VALUE = {1'b1, {DATA_W{1'b0}}};

  assign less_out = en && (data_in < data_now);
  assign eql      = left_valid  && !bound_now   && (left_data  == data_now);
  assign eqr      = right_valid && !right_bound && (right_data == data_now);
  assign sust     = eql || eqr;

  always_ff @(posedge clk) begin
    if (clear) begin
      data_now  <= MAX_VALUE;
      id_now    <= '0;
      bound_now <= 1'b0;
    end else begin
      if (set_max) begin
        data_now <= MAX_VALUE;
      end else if (en) begin
        if (less_in) begin
          data_now <= left_data;
          id_now   <= left_id;
        end else if (less_out) begin
          data_now <= data_in;
          id_now   <= id_in;
        end
      end
      if (capture && left_valid && (left_data != data_now))
        bound_now <= 1'b1;
    end
  end

endmodule
