// crosspoint: one crosspoint switch of the crossbar.
//
// As in the paper, a crosspoint holds two switching boxes, addr_box for
// the address lines and data_box for the data lines, each steered by its
// own control line (addr_c, data_c). The port-line runs east -> west
// through the crosspoint and the bus-line north <-> south. Address and write
// data flow down the bus-line; read data flows up (see data_box). MEM_ROW
// says whether the crosspoint sits on a memory port-line or a processor
// port-line, which fixes the direction each box switches in.
// Purely combinational: a connection exists in the same cycle its controls
// are set.
module crosspoint #(
  parameter int unsigned AW      = 17,
  parameter int unsigned DW      = 32,
  parameter bit          MEM_ROW = 1'b0
) (
  input  logic          addr_c,
  input  logic          data_c,
  input  logic [AW-1:0] addr_e,
  output logic [AW-1:0] addr_w,
  input  logic [AW-1:0] addr_n,
  output logic [AW-1:0] addr_s,
  input  logic [DW-1:0] data_e_wr,
  output logic [DW-1:0] data_w_wr,
  input  logic [DW-1:0] data_n_wr,
  output logic [DW-1:0] data_s_wr,
  input  logic [DW-1:0] data_e_rd,
  output logic [DW-1:0] data_w_rd,
  input  logic [DW-1:0] data_s_rd,
  output logic [DW-1:0] data_n_rd
);
  addr_box #(.W(AW), .MEM_ROW(MEM_ROW)) u_addr_box (
    .addr_c(addr_c), .addr_e(addr_e), .addr_w(addr_w), .addr_n(addr_n), .addr_s(addr_s)
  );

  data_box #(.W(DW), .MEM_ROW(MEM_ROW)) u_data_box (
    .data_c(data_c),
    .data_e_wr(data_e_wr), .data_w_wr(data_w_wr), .data_n_wr(data_n_wr), .data_s_wr(data_s_wr),
    .data_e_rd(data_e_rd), .data_w_rd(data_w_rd), .data_s_rd(data_s_rd), .data_n_rd(data_n_rd)
  );
endmodule
