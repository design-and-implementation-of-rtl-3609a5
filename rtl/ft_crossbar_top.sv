// ft_crossbar_top: the two fault-tolerant one-sided crossbar switches.
//
// The design proposes two ways to cut the crosspoint count of a one-sided
// crossbar while keeping a spare path for every connection:
//   - the modified one-sided crossbar (mod_* ports): memories in G groups,
//     each group wired to its own B/G bus-lines;
//   - the ripple K one-sided crossbar (rip_* ports): each memory wired to K
//     neighbouring bus-lines, the window shifting by one per memory.
// Both are built here side by side at the size used for the area and delay
// comparison: 4 processors x 4 memory modules, 4 bus-lines, G = 2, K = 3.
// They are independent; each is a crossbar_model (arbiter + switch) with its
// own processor ports, memory ports and crosspoint fault map. All paths are
// combinational: a request is granted, and its address reaches the memory,
// in the same cycle.
module ft_crossbar_top
  import xbar_pkg::*;
#(
  parameter int unsigned N      = 4,
  parameter int unsigned M      = 4,
  parameter int unsigned G      = 2,
  parameter int unsigned K      = 3,
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned NB    = min_u(N, M)
) (
  // modified one-sided crossbar
  input  req_t [N-1:0]              mod_req,
  input  logic [N+M-1:0][NB-1:0]    mod_xp_fault,
  output logic [N-1:0]              mod_grant,
  input  logic [N-1:0][ADDR_W-1:0]  mod_addr_p,
  input  logic [N-1:0][DATA_W-1:0]  mod_wdata_p,
  output logic [N-1:0][DATA_W-1:0]  mod_rdata_p,
  output logic [M-1:0]              mod_mem_sel,
  output logic [M-1:0]              mod_mem_we,
  output logic [M-1:0][ADDR_W-1:0]  mod_addr_m,
  output logic [M-1:0][DATA_W-1:0]  mod_wdata_m,
  input  logic [M-1:0][DATA_W-1:0]  mod_rdata_m,
  // ripple K one-sided crossbar
  input  req_t [N-1:0]              rip_req,
  input  logic [N+M-1:0][NB-1:0]    rip_xp_fault,
  output logic [N-1:0]              rip_grant,
  input  logic [N-1:0][ADDR_W-1:0]  rip_addr_p,
  input  logic [N-1:0][DATA_W-1:0]  rip_wdata_p,
  output logic [N-1:0][DATA_W-1:0]  rip_rdata_p,
  output logic [M-1:0]              rip_mem_sel,
  output logic [M-1:0]              rip_mem_we,
  output logic [M-1:0][ADDR_W-1:0]  rip_addr_m,
  output logic [M-1:0][DATA_W-1:0]  rip_wdata_m,
  input  logic [M-1:0][DATA_W-1:0]  rip_rdata_m
);
  crossbar_model #(
    .N(N), .M(M), .TOPO(TOPO_MODIFIED), .G(G), .K(K), .ADDR_W(ADDR_W), .DATA_W(DATA_W)
  ) u_modified (
    .req(mod_req), .xp_fault(mod_xp_fault), .grant(mod_grant),
    .addr_p(mod_addr_p), .wdata_p(mod_wdata_p), .rdata_p(mod_rdata_p),
    .mem_sel(mod_mem_sel), .mem_we(mod_mem_we), .addr_m(mod_addr_m),
    .wdata_m(mod_wdata_m), .rdata_m(mod_rdata_m)
  );

  crossbar_model #(
    .N(N), .M(M), .TOPO(TOPO_RIPPLE), .G(G), .K(K), .ADDR_W(ADDR_W), .DATA_W(DATA_W)
  ) u_ripple (
    .req(rip_req), .xp_fault(rip_xp_fault), .grant(rip_grant),
    .addr_p(rip_addr_p), .wdata_p(rip_wdata_p), .rdata_p(rip_rdata_p),
    .mem_sel(rip_mem_sel), .mem_we(rip_mem_we), .addr_m(rip_addr_m),
    .wdata_m(rip_wdata_m), .rdata_m(rip_rdata_m)
  );
endmodule
