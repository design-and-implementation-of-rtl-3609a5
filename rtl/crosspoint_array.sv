// crosspoint_array: the two-dimensional matrix of crosspoints.
//
// Rows are port-lines: rows 0..N-1 belong to the processors, rows
// N..N+M-1 to the memory modules (the order in which the paper draws the one-sided
// crossbar). Columns are the NB bus-lines. A crosspoint is built only where
// the topology has one (xbar_pkg::xp_present): all of them for the
// one-sided crossbar, a group of NB/G bus-lines per partial-side row for the
// modified crossbar, a window of K bus-lines that moves one step per row for
// the ripple K crossbar. Where there is no crosspoint both lines just pass.
//
// Each line is an OR-chain (see addr_box, data_box):
//   - port-lines enter at bus-line 0 and leave after bus-line NB-1;
//   - address/write-data bus-lines start at row 0 with zero and flow down;
//   - read-data bus-lines start below the last row with zero and flow up.
// addr_p carries a processor's {write, address}; addr_m is what reaches a
// memory port-line. Purely combinational.
module crosspoint_array
  import xbar_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned M    = 4,
  parameter int unsigned NB   = min_u(N, M),
  parameter topo_e       TOPO = TOPO_MODIFIED,
  parameter int unsigned G    = 2,
  parameter int unsigned K    = 3,
  parameter int unsigned AW   = 17,
  parameter int unsigned DW   = 32
) (
  input  logic [N+M-1:0][NB-1:0] addr_c,
  input  logic [N+M-1:0][NB-1:0] data_c,
  input  logic [N-1:0][AW-1:0]   addr_p,
  input  logic [N-1:0][DW-1:0]   wdata_p,
  output logic [N-1:0][DW-1:0]   rdata_p,
  output logic [M-1:0][AW-1:0]   addr_m,
  output logic [M-1:0][DW-1:0]   wdata_m,
  input  logic [M-1:0][DW-1:0]   rdata_m
);
  localparam int unsigned R = N + M;

  // Every cell (row r, bus-line b) has its own line segments: the port-line
  // segments it passes on to the west (*_w) and the bus-line segments it
  // passes on to the south (address, write data) or north (read data).
  for (genvar r = 0; r < R; r++) begin : g_row
    // values entering the port-line at bus-line 0
    logic [AW-1:0] row_addr;
    logic [DW-1:0] row_wr, row_rd;
    if (r < N) begin : g_proc
      assign row_addr   = addr_p[r];
      assign row_wr     = wdata_p[r];
      assign row_rd     = '0;
      assign rdata_p[r] = g_col[NB-1].rd_w;
    end else begin : g_mem
      assign row_addr     = '0;
      assign row_wr       = '0;
      assign row_rd       = rdata_m[r-N];
      assign addr_m[r-N]  = g_col[NB-1].addr_w;
      assign wdata_m[r-N] = g_col[NB-1].wr_w;
    end

    for (genvar b = 0; b < NB; b++) begin : g_col
      logic [AW-1:0] addr_e, addr_w, addr_n, addr_s;
      logic [DW-1:0] wr_e, wr_w, wr_n, wr_s;
      logic [DW-1:0] rd_e, rd_w, rd_s, rd_n;

      // port-line input: from the row end or the cell to the east
      if (b == 0) begin : g_first
        assign addr_e = row_addr;
        assign wr_e   = row_wr;
        assign rd_e   = row_rd;
      end else begin : g_next
        assign addr_e = g_row[r].g_col[b-1].addr_w;
        assign wr_e   = g_row[r].g_col[b-1].wr_w;
        assign rd_e   = g_row[r].g_col[b-1].rd_w;
      end

      // downward bus-lines: from the top or the cell above
      if (r == 0) begin : g_top
        assign addr_n = '0;
        assign wr_n   = '0;
      end else begin : g_below
        assign addr_n = g_row[r-1].g_col[b].addr_s;
        assign wr_n   = g_row[r-1].g_col[b].wr_s;
      end

      // upward read bus-line: from the bottom or the cell below
      if (r == R - 1) begin : g_bottom
        assign rd_s = '0;
      end else begin : g_above
        assign rd_s = g_row[r+1].g_col[b].rd_n;
      end

      if (xp_present(TOPO, r, b, N, M, NB, G, K)) begin : g_xp
        crosspoint #(.AW(AW), .DW(DW), .MEM_ROW(r >= N)) u_xp (
          .addr_c   (addr_c[r][b]),
          .data_c   (data_c[r][b]),
          .addr_e   (addr_e),
          .addr_w   (addr_w),
          .addr_n   (addr_n),
          .addr_s   (addr_s),
          .data_e_wr(wr_e),
          .data_w_wr(wr_w),
          .data_n_wr(wr_n),
          .data_s_wr(wr_s),
          .data_e_rd(rd_e),
          .data_w_rd(rd_w),
          .data_s_rd(rd_s),
          .data_n_rd(rd_n)
        );
      end else begin : g_none
        // no crosspoint here: both lines pass unchanged
        assign addr_w = addr_e;
        assign wr_w   = wr_e;
        assign rd_w   = rd_e;
        assign addr_s = addr_n;
        assign wr_s   = wr_n;
        assign rd_n   = rd_s;
      end
    end
  end

  // Control lines of crosspoints that are not built are unused.
  logic unused_ctrl;
  assign unused_ctrl = ^{addr_c, data_c};
endmodule
