// crossbar_model: one complete crossbar switch (arbiter + switch).
//
// Each cycle every processor may present a request (valid, read/write,
// memory module number) with its address and write data. The arbiter
// grants at most one processor per memory module and gives each granted
// connection a bus-line whose two crosspoints exist and are not marked
// faulty; the switch then joins the processor's port-line to the memory's
// port-line through that bus-line. Everything happens in the same cycle:
// request -> grant and request -> address at the memory are combinational,
// and read data returns combinationally from rdata_m to rdata_p, so the
// processors and memories decide when to sample. A request that is not
// granted is dropped; the processor may issue it again.
//
// TOPO/G/K choose the crosspoint pattern: TOPO_ONE_SIDED (all crosspoints),
// TOPO_MODIFIED with G groups, TOPO_RIPPLE with K crosspoints per
// partial-side row. NB, the number of bus-lines, is min(N, M) as the
// document requires for a nonblocking switch. xp_fault marks crosspoints
// known to be broken (rows 0..N-1 processors, N..N+M-1 memories); the
// arbiter routes around them. Widths and the fault-map input are this
// design's choices.
module crossbar_model
  import xbar_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned M      = 4,
  parameter topo_e       TOPO   = TOPO_MODIFIED,
  parameter int unsigned G      = 2,
  parameter int unsigned K      = 3,
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned NB    = min_u(N, M)
) (
  input  req_t [N-1:0]              req,
  input  logic [N+M-1:0][NB-1:0]    xp_fault,
  output logic [N-1:0]              grant,
  input  logic [N-1:0][ADDR_W-1:0]  addr_p,
  input  logic [N-1:0][DATA_W-1:0]  wdata_p,
  output logic [N-1:0][DATA_W-1:0]  rdata_p,
  output logic [M-1:0]              mem_sel,
  output logic [M-1:0]              mem_we,
  output logic [M-1:0][ADDR_W-1:0]  addr_m,
  output logic [M-1:0][DATA_W-1:0]  wdata_m,
  input  logic [M-1:0][DATA_W-1:0]  rdata_m
);
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1;

  // The paper's constraints on the parameters (its Table 2 and
  // Section 3.1): B and the partial side must divide by g, 1 <= K <= B.
  if (TOPO == TOPO_MODIFIED && (G < 1 || G > NB || NB % G != 0 || ((N >= M) ? M : N) % G != 0))
  begin : g_check_g
    $error("crossbar_model: G must divide B and the partial-side port count");
  end
  if (TOPO == TOPO_RIPPLE && (K < 1 || K > NB)) begin : g_check_k
    $error("crossbar_model: K must lie in 1..B");
  end
  if (M > (1 << MAX_MEM_W)) begin : g_check_m
    $error("crossbar_model: M exceeds the request format");
  end

  logic [N+M-1:0]         row_act;
  logic [N+M-1:0][BW-1:0] row_bus;
  logic [N-1:0]           we_p;

  arbiter #(.N(N), .M(M), .NB(NB), .TOPO(TOPO), .G(G), .K(K)) u_arbiter (
    .req(req), .xp_fault(xp_fault), .grant(grant), .row_act(row_act), .row_bus(row_bus)
  );

  always_comb for (int unsigned i = 0; i < N; i++) we_p[i] = req[i].write;

  xbar_switch #(
    .N(N), .M(M), .NB(NB), .TOPO(TOPO), .G(G), .K(K), .ADDR_W(ADDR_W), .DATA_W(DATA_W)
  ) u_switch (
    .row_act(row_act), .row_bus(row_bus), .we_p(we_p),
    .addr_p(addr_p), .wdata_p(wdata_p), .rdata_p(rdata_p),
    .mem_sel(mem_sel), .mem_we(mem_we), .addr_m(addr_m), .wdata_m(wdata_m), .rdata_m(rdata_m)
  );
endmodule
