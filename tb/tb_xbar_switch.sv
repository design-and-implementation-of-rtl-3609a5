// tb_xbar_switch: self-checking test of the switch (demultiplexing +
// crosspoint_array) for the three 4 x 4 topologies.
// Each cycle a random set of connections on distinct, existing crosspoints
// (tb_ref_pkg) is encoded as row_act/row_bus, the way the arbiter delivers
// it. Expected at each connected memory: mem_sel set, mem_we equal to the
// processor's write mode, its address and write data; at each connected
// processor: the memory's read data. Idle ports read zero.
module tb_xbar_switch;
  import xbar_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned N = 4, M = 4, NB = 4, AW = 16, DW = 32;
  int checks = 0, failures = 0, connections = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N+M-1:0]       row_act [3];
  logic [N+M-1:0][1:0]  row_bus [3];
  logic [N-1:0]         we_p;
  logic [N-1:0][AW-1:0] addr_p;
  logic [N-1:0][DW-1:0] wdata_p;
  logic [M-1:0][DW-1:0] rdata_m;
  logic [N-1:0][DW-1:0] rdata_p [3];
  logic [M-1:0]         mem_sel [3], mem_we [3];
  logic [M-1:0][AW-1:0] addr_m [3];
  logic [M-1:0][DW-1:0] wdata_m [3];

  for (genvar t = 0; t < 3; t++) begin : g_dut
    xbar_switch #(.N(N), .M(M), .NB(NB), .TOPO(topo_of(t)), .G(2), .K(3), .ADDR_W(AW), .DATA_W(DW)) u_dut (
      .row_act(row_act[t]), .row_bus(row_bus[t]), .we_p(we_p), .addr_p(addr_p), .wdata_p(wdata_p),
      .rdata_p(rdata_p[t]), .mem_sel(mem_sel[t]), .mem_we(mem_we[t]), .addr_m(addr_m[t]),
      .wdata_m(wdata_m[t]), .rdata_m(rdata_m));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int proc_of_mem [3][M];

  initial begin
    for (int t = 0; t < 3; t++) begin
      row_act[t] = '0;
      row_bus[t] = '0;
    end
    we_p = '0; addr_p = '0; wdata_p = '0; rdata_m = '0;
    for (int it = 0; it < 800; it++) begin
      @(negedge clk);
      we_p = N'($urandom);
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
        row_act[t] = '0;
        row_bus[t] = (2*(N+M))'($urandom);  // don't-care where inactive
        for (int j = 0; j < M; j++) proc_of_mem[t][j] = -1;
        for (int i = 0; i < N; i++) begin
          int j, b;
          j = int'($urandom % M);
          b = int'($urandom % NB);
          if (mem_used[j] || bus_used[b] || !mem_mask4(topo_of(t), j)[b]) continue;
          mem_used[j] = 1'b1;
          bus_used[b] = 1'b1;
          proc_of_mem[t][j] = i;
          row_act[t][i] = 1'b1;     row_bus[t][i] = 2'(b);
          row_act[t][N+j] = 1'b1;   row_bus[t][N+j] = 2'(b);
          connections++;
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
          check(mem_sel[t][j] == (i >= 0), $sformatf("topo %0d mem_sel[%0d]", t, j));
          check(mem_we[t][j]  == ((i >= 0) ? we_p[i] : 1'b0), $sformatf("topo %0d mem_we[%0d]", t, j));
          check(addr_m[t][j]  == ((i >= 0) ? addr_p[i] : '0), $sformatf("topo %0d addr_m[%0d]", t, j));
          check(wdata_m[t][j] == ((i >= 0) ? wdata_p[i] : '0), $sformatf("topo %0d wdata_m[%0d]", t, j));
        end
        for (int i = 0; i < N; i++)
          check(rdata_p[t][i] == exp_rd[i], $sformatf("topo %0d rdata_p[%0d]", t, i));
      end
    end
    check(connections > 0, "coverage");
    $display("connections=%0d", connections);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
