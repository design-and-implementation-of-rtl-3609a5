// demultiplexing: turns the arbiter's path settings into crosspoint controls.
//
// For every port-line r the arbiter gives row_act[r] (the line takes part in
// a connection) and row_bus[r] (the bus-line it uses). This block decodes
// them into one control bit per crosspoint: addr_c[r][b] closes the
// address box and data_c[r][b] the data box of crosspoint (r, b). Both
// boxes of a connection's two crosspoints close together, because a read
// and a write both need address and data. The paper gives the block's
// name and function; the one-hot decode is the simplest way to do it.
// Purely combinational.
module demultiplexing #(
  parameter int unsigned R   = 8,
  parameter int unsigned NB  = 4,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic [R-1:0]          row_act,
  input  logic [R-1:0][BW-1:0]  row_bus,
  output logic [R-1:0][NB-1:0]  addr_c,
  output logic [R-1:0][NB-1:0]  data_c
);
  always_comb begin
    for (int unsigned r = 0; r < R; r++) begin
      for (int unsigned b = 0; b < NB; b++) begin
        addr_c[r][b] = row_act[r] && (int'(row_bus[r]) == b);
        data_c[r][b] = row_act[r] && (int'(row_bus[r]) == b);
      end
    end
  end
endmodule
