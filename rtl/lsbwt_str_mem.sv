// String memory: a copy of the input string, one character per index.
// Written while the string is loaded (we, waddr, wdata). Two asynchronous read
// ports: port a gives the character x places after an index, used to
// substitute tied characters; port b gives the character at a prefix index,
// which is the BWT output character. An array of registers; its existence and
// its ports are this design's choice, since the architecture only states that
// each tied character is replaced by the one x places after it.
module lsbwt_str_mem #(
  parameter int unsigned N      = lsbwt_pkg::DEF_N,
  parameter int unsigned DATA_W = lsbwt_pkg::DEF_DATA_W,
  localparam int unsigned ID_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ID_W-1:0]   waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ID_W-1:0]   raddr_a,
  output logic [DATA_W-1:0] rdata_a,
  input  logic [ID_W-1:0]   raddr_b,
  output logic [DATA_W-1:0] rdata_b
);

  logic [DATA_W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
