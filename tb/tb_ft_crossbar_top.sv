// tb_ft_crossbar_top: end-to-end test of both fault-tolerant crossbars at
// their default size (4 x 4, modified g = 2, ripple K = 3).
// Each crossbar serves four processors, driven by this testbench, and four
// behavioural memory modules (mem_model). Every cycle each processor
// requests a random module (reads and writes to a small address range, so
// reads often return earlier writes). A shadow copy of every memory predicts
// read data. The run has three phases:
//   1. no faults: grants must equal the reference (lowest processor wins
//      each requested module), all in the request's own cycle;
//   2. one random faulty crosspoint per cycle: grants may only drop where a
//      fault leaves no path;
//   3. every crosspoint of one memory row marked faulty: that module must be
//      refused, others still served.
// It counts, and requires at least once each: reads, writes, conflicts
// (a losing processor), cycles with all four connections at once,
// connections moved off their preferred bus-line by a fault, and requests
// refused because faults left no path.
module tb_ft_crossbar_top;
  import xbar_pkg::*;
  localparam int unsigned N = 4, M = 4, NB = 4, AW = 16, DW = 32, AR = 16;

  int checks = 0, failures = 0;
  int n_read = 0, n_write = 0, n_conflict = 0, n_full = 0, n_reroute = 0, n_refused = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // per crossbar (0 = modified, 1 = ripple K)
  req_t [N-1:0]           req     [2];
  logic [N+M-1:0][NB-1:0] fault   [2];
  logic [N-1:0]           grant   [2];
  logic [N-1:0][AW-1:0]   addr_p  [2];
  logic [N-1:0][DW-1:0]   wdata_p [2];
  logic [N-1:0][DW-1:0]   rdata_p [2];
  logic [M-1:0]           mem_sel [2];
  logic [M-1:0]           mem_we  [2];
  logic [M-1:0][AW-1:0]   addr_m  [2];
  logic [M-1:0][DW-1:0]   wdata_m [2];
  logic [M-1:0][DW-1:0]   rdata_m [2];

  ft_crossbar_top u_dut (
    .mod_req(req[0]), .mod_xp_fault(fault[0]), .mod_grant(grant[0]),
    .mod_addr_p(addr_p[0]), .mod_wdata_p(wdata_p[0]), .mod_rdata_p(rdata_p[0]),
    .mod_mem_sel(mem_sel[0]), .mod_mem_we(mem_we[0]), .mod_addr_m(addr_m[0]),
    .mod_wdata_m(wdata_m[0]), .mod_rdata_m(rdata_m[0]),
    .rip_req(req[1]), .rip_xp_fault(fault[1]), .rip_grant(grant[1]),
    .rip_addr_p(addr_p[1]), .rip_wdata_p(wdata_p[1]), .rip_rdata_p(rdata_p[1]),
    .rip_mem_sel(mem_sel[1]), .rip_mem_we(mem_we[1]), .rip_addr_m(addr_m[1]),
    .rip_wdata_m(wdata_m[1]), .rip_rdata_m(rdata_m[1])
  );

  for (genvar x = 0; x < 2; x++) begin : g_xbar
    for (genvar j = 0; j < M; j++) begin : g_mem
      mem_model #(.ADDR_W(AW), .DATA_W(DW), .DEPTH(256)) u_mem (
        .clk(clk), .sel(mem_sel[x][j]), .we(mem_we[x][j]), .addr(addr_m[x][j]),
        .wdata(wdata_m[x][j]), .rdata(rdata_m[x][j]));
    end
  end

  logic [DW-1:0] shadow [2][M][AR];

  // Crosspoints of memory row j, and the bus-line tried first, as drawn.
  function automatic logic [NB-1:0] mem_mask(int x, int j);
    if (x == 0) return (j < 2) ? 4'b0011 : 4'b1100;
    return 4'((4'b0111 << j) | (4'b0111 >> (4 - j)));
  endfunction
  function automatic int pref_bus(int x, int j);
    return (x == 0) ? ((j < 2) ? 0 : 2) : j;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 2; x++) begin
      req[x] = '0; fault[x] = '0; addr_p[x] = '0; wdata_p[x] = '0;
      for (int j = 0; j < M; j++)
        for (int a = 0; a < AR; a++) shadow[x][j][a] = '0;
    end
    for (int cyc = 0; cyc < 1200; cyc++) begin
      int phase;
      phase = (cyc < 400) ? 1 : (cyc < 800) ? 2 : 3;
      @(negedge clk);
      for (int x = 0; x < 2; x++) begin
        for (int i = 0; i < N; i++) begin
          req[x][i].valid = ($urandom % 8) != 0;
          req[x][i].write = ($urandom % 3) == 0;
          req[x][i].mem   = MAX_MEM_W'($urandom % M);
          addr_p[x][i]    = AW'($urandom % AR);
          wdata_p[x][i]   = $urandom;
        end
        fault[x] = '0;
        if (phase == 2) fault[x][$urandom % (N + M)][$urandom % NB] = 1'b1;
        if (phase == 3) fault[x][N + ($urandom % M)] = '1;
      end
      #1;
      for (int x = 0; x < 2; x++) begin
        logic [N-1:0] ref_win;
        for (int i = 0; i < N; i++) begin
          ref_win[i] = req[x][i].valid;
          for (int h = 0; h < i; h++)
            if (req[x][h].valid && req[x][h].mem == req[x][i].mem) ref_win[i] = 1'b0;
          if (req[x][i].valid && !ref_win[i]) n_conflict++;
        end
        if (phase == 1)
          check(grant[x] == ref_win, $sformatf("xbar %0d cycle %0d: grant %b expected %b", x, cyc, grant[x], ref_win));
        else
          check((grant[x] & ~ref_win) == '0, $sformatf("xbar %0d cycle %0d: grant to a loser", x, cyc));
        if (grant[x] == '1) n_full++;
        for (int i = 0; i < N; i++) begin
          int j, a;
          j = int'(req[x][i].mem);
          a = int'(addr_p[x][i]);
          if (ref_win[i] && !grant[x][i]) begin
            // refused: every crosspoint pair of this connection must be blocked
            // by a fault or taken by an earlier connection
            n_refused++;
            check(phase != 1, $sformatf("xbar %0d: refused without faults", x));
            if (fault[x][N + j] != mem_mask(x, j) && (fault[x][N + j] & mem_mask(x, j)) == '0
                && fault[x][i] == '0)
              check(1'b0, $sformatf("xbar %0d: refused with no fault on its path", x));
          end
          if (grant[x][i]) begin
            check(mem_sel[x][j] && addr_m[x][j] == addr_p[x][i],
                  $sformatf("xbar %0d: processor %0d not connected to memory %0d", x, i, j));
            if (fault[x][N + j][pref_bus(x, j)]) n_reroute++;
            if (req[x][i].write) begin
              n_write++;
              check(mem_we[x][j] && wdata_m[x][j] == wdata_p[x][i],
                    $sformatf("xbar %0d: write of processor %0d", x, i));
              shadow[x][j][a] = wdata_p[x][i];
            end else begin
              n_read++;
              check(!mem_we[x][j] && rdata_p[x][i] == shadow[x][j][a],
                    $sformatf("xbar %0d: read by processor %0d from %0d[%0d]: %h expected %h",
                              x, i, j, a, rdata_p[x][i], shadow[x][j][a]));
            end
          end
        end
        if (phase == 3)
          for (int j = 0; j < M; j++)
            if (fault[x][N + j] == '1) check(!mem_sel[x][j], $sformatf("xbar %0d: dead memory %0d selected", x, j));
      end
    end
    check(n_read > 0,     "no read happened");
    check(n_write > 0,    "no write happened");
    check(n_conflict > 0, "no conflict happened");
    check(n_full > 0,     "never four connections at once");
    check(n_reroute > 0,  "no connection was rerouted around a fault");
    check(n_refused > 0,  "no request was refused for lack of a path");
    $display("reads=%0d writes=%0d conflicts=%0d full-cycles=%0d reroutes=%0d refused=%0d",
             n_read, n_write, n_conflict, n_full, n_reroute, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
