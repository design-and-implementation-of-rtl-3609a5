// arbiter: the control half of the crossbar.
//
// As in the paper, the arbiter is priority_check (resolving conflicts
// between processors that want the same memory module) followed by
// path_setup (choosing a bus-line for every connection that survives).
// Requests, the fault map and the outputs are all in the same cycle: the
// arbiter is combinational, and its outputs steer the switch directly.
// grant tells each processor that it may use its memory module now;
// row_act/row_bus tell the switch which port-lines to join to which
// bus-lines.
module arbiter
  import xbar_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned M    = 4,
  parameter int unsigned NB   = min_u(N, M),
  parameter topo_e       TOPO = TOPO_MODIFIED,
  parameter int unsigned G    = 2,
  parameter int unsigned K    = 3,
  localparam int unsigned BW  = (NB > 1) ? $clog2(NB) : 1
) (
  input  req_t [N-1:0]            req,
  input  logic [N+M-1:0][NB-1:0]  xp_fault,
  output logic [N-1:0]            grant,
  output logic [N+M-1:0]          row_act,
  output logic [N+M-1:0][BW-1:0]  row_bus
);
  logic [N-1:0]                  win;
  logic [M-1:0]                  mem_req;
  logic [M-1:0][$clog2(N+1)-1:0] mem_owner;

  priority_check #(.N(N), .M(M)) u_priority_check (
    .req(req), .win(win), .mem_req(mem_req), .mem_owner(mem_owner)
  );

  path_setup #(.N(N), .M(M), .NB(NB), .TOPO(TOPO), .G(G), .K(K)) u_path_setup (
    .req(req), .win(win), .xp_fault(xp_fault),
    .grant(grant), .row_act(row_act), .row_bus(row_bus)
  );

  // Which processor owns which module is implied by the request of the
  // winner; these outputs of priority_check are not needed here.
  logic unused_pc;
  assign unused_pc = ^{mem_req, mem_owner};
endmodule
