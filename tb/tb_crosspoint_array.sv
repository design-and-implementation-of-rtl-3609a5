// tb_crosspoint_array: self-checking test of the crosspoint matrix.
// Three 4 x 4 arrays are built: one-sided, modified (g = 2) and ripple
// (K = 3). Each iteration picks, for each array, a random set of
// processor-memory connections on distinct bus-lines, using only
// crosspoints the published drawings show (tb_ref_pkg), closes their
// controls, and sometimes also closes the control of a crosspoint the
// drawing does not have on an idle memory row. Expected: every connected
// memory sees its processor's address and write data, every connected
// processor sees its memory's read data, and everything else reads zero (a
// missing crosspoint must switch nothing). Combinational: checked at once.
module tb_crosspoint_array;
  import xbar_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned N = 4, M = 4, NB = 4, AW = 17, DW = 32;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N+M-1:0][NB-1:0] addr_c [3];
  logic [N+M-1:0][NB-1:0] data_c [3];
  logic [N-1:0][AW-1:0]   addr_p;
  logic [N-1:0][DW-1:0]   wdata_p;
  logic [M-1:0][DW-1:0]   rdata_m;
  logic [N-1:0][DW-1:0]   rdata_p [3];
  logic [M-1:0][AW-1:0]   addr_m  [3];
  logic [M-1:0][DW-1:0]   wdata_m [3];

  for (genvar t = 0; t < 3; t++) begin : g_dut
    crosspoint_array #(.N(N), .M(M), .NB(NB), .TOPO(topo_of(t)), .G(2), .K(3), .AW(AW), .DW(DW)) u_dut (
      .addr_c(addr_c[t]), .data_c(data_c[t]), .addr_p(addr_p), .wdata_p(wdata_p),
      .rdata_p(rdata_p[t]), .addr_m(addr_m[t]), .wdata_m(wdata_m[t]), .rdata_m(rdata_m));
  end

  task automatic expect_eq(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int proc_of_mem [3][M];  // -1 when idle
  int connections = 0, spurious = 0;

  initial begin
    for (int t = 0; t < 3; t++) begin
      addr_c[t] = '0;
      data_c[t] = '0;
    end
    addr_p = '0; wdata_p = '0; rdata_m = '0;
    for (int it = 0; it < 600; it++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        addr_p[i]  = AW'($urandom);
        wdata_p[i] = $urandom;
      end
      for (int j = 0; j < M; j++) rdata_m[j] = $urandom;
      for (int t = 0; t < 3; t++) begin
        logic [NB-1:0] bus_used;
        logic [M-1:0]  mem_used;
        bus_used = '0;
        mem_used = '0;
        addr_c[t] = '0;
        data_c[t] = '0;
        for (int j = 0; j < M; j++) proc_of_mem[t][j] = -1;
        for (int i = 0; i < N; i++) begin
          int j, b;
          if ($urandom % 4 == 0) continue;
          j = int'($urandom % M);
          b = int'($urandom % NB);
          if (mem_used[j] || bus_used[b] || !mem_mask4(topo_of(t), j)[b]) continue;
          mem_used[j] = 1'b1;
          bus_used[b] = 1'b1;
          proc_of_mem[t][j] = i;
          addr_c[t][i][b] = 1'b1;     data_c[t][i][b] = 1'b1;
          addr_c[t][N+j][b] = 1'b1;   data_c[t][N+j][b] = 1'b1;
          connections++;
        end
        // a control on a crosspoint that does not exist must do nothing
        for (int j = 0; j < M; j++) begin
          int b;
          b = int'($urandom % NB);
          if (!mem_used[j] && !mem_mask4(topo_of(t), j)[b] && !bus_used[b]) begin
            addr_c[t][N+j][b] = 1'b1;
            data_c[t][N+j][b] = 1'b1;
            spurious++;
          end
        end
      end
      #1;
      for (int t = 0; t < 3; t++) begin
        logic [DW-1:0] exp_rd [N];
        for (int i = 0; i < N; i++) exp_rd[i] = '0;
        for (int j = 0; j < M; j++) begin
          int i;
          i = proc_of_mem[t][j];
          if (i >= 0) exp_rd[i] = rdata_m[j];
          expect_eq(DW'(addr_m[t][j]), (i >= 0) ? DW'(addr_p[i]) : '0, $sformatf("topo %0d addr_m[%0d]", t, j));
          expect_eq(wdata_m[t][j],     (i >= 0) ? wdata_p[i] : '0,     $sformatf("topo %0d wdata_m[%0d]", t, j));
        end
        for (int i = 0; i < N; i++)
          expect_eq(rdata_p[t][i], exp_rd[i], $sformatf("topo %0d rdata_p[%0d]", t, i));
      end
    end
    checks++;
    if (connections == 0 || spurious == 0) begin
      failures++;
      $display("FAIL coverage: connections=%0d spurious=%0d", connections, spurious);
    end
    $display("connections=%0d controls on missing crosspoints=%0d", connections, spurious);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
