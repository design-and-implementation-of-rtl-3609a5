// xbar_switch: the data-moving half of the crossbar.
//
// As in the paper, the switch is demultiplexing (decoding the arbiter's
// path settings into crosspoint controls) followed by crosspoint_array.
// Besides the address and data lines it gives each memory module two
// signals the paper leaves implicit: mem_sel (the module's port-line is
// connected this cycle) and mem_we (the write mode, carried through the
// switch as the top bit of the address lines). Purely combinational.
module xbar_switch
  import xbar_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned M      = 4,
  parameter int unsigned NB     = min_u(N, M),
  parameter topo_e       TOPO   = TOPO_MODIFIED,
  parameter int unsigned G      = 2,
  parameter int unsigned K      = 3,
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned BW    = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic [N+M-1:0]            row_act,
  input  logic [N+M-1:0][BW-1:0]    row_bus,
  input  logic [N-1:0]              we_p,
  input  logic [N-1:0][ADDR_W-1:0]  addr_p,
  input  logic [N-1:0][DATA_W-1:0]  wdata_p,
  output logic [N-1:0][DATA_W-1:0]  rdata_p,
  output logic [M-1:0]              mem_sel,
  output logic [M-1:0]              mem_we,
  output logic [M-1:0][ADDR_W-1:0]  addr_m,
  output logic [M-1:0][DATA_W-1:0]  wdata_m,
  input  logic [M-1:0][DATA_W-1:0]  rdata_m
);
  localparam int unsigned AW = ADDR_W + 1;

  logic [N+M-1:0][NB-1:0] addr_c, data_c;
  logic [N-1:0][AW-1:0]   ctl_addr_p;
  logic [M-1:0][AW-1:0]   ctl_addr_m;

  demultiplexing #(.R(N + M), .NB(NB)) u_demultiplexing (
    .row_act(row_act), .row_bus(row_bus), .addr_c(addr_c), .data_c(data_c)
  );

  always_comb begin
    for (int unsigned i = 0; i < N; i++) ctl_addr_p[i] = {we_p[i], addr_p[i]};
    for (int unsigned j = 0; j < M; j++) begin
      {mem_we[j], addr_m[j]} = ctl_addr_m[j];
      mem_sel[j]             = |addr_c[N + j];
    end
  end

  crosspoint_array #(
    .N(N), .M(M), .NB(NB), .TOPO(TOPO), .G(G), .K(K), .AW(AW), .DW(DATA_W)
  ) u_crosspoint_array (
    .addr_c(addr_c), .data_c(data_c),
    .addr_p(ctl_addr_p), .wdata_p(wdata_p), .rdata_p(rdata_p),
    .addr_m(ctl_addr_m), .wdata_m(wdata_m), .rdata_m(rdata_m)
  );
endmodule
