// tb_priority_check: self-checking test of conflict resolution.
// Random requests from 4 processors to 4 memory modules (including some
// naming a module that does not exist). Reference: for every module the
// lowest-numbered processor with a valid request wins; a processor wins
// only if it is that one. Combinational: checked at once.
module tb_priority_check;
  import xbar_pkg::*;
  localparam int unsigned N = 4, M = 4;
  int checks = 0, failures = 0, conflicts = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  req_t [N-1:0]                  req;
  logic [N-1:0]                  win;
  logic [M-1:0]                  mem_req;
  logic [M-1:0][$clog2(N+1)-1:0] mem_owner;

  priority_check #(.N(N), .M(M)) u_dut (.req(req), .win(win), .mem_req(mem_req), .mem_owner(mem_owner));

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
    req = '0;
    for (int it = 0; it < 800; it++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        req[i].valid = 1'($urandom);
        req[i].write = 1'($urandom);
        req[i].mem   = ($urandom % 10 == 0) ? MAX_MEM_W'(M + $urandom % 3) : MAX_MEM_W'($urandom % M);
      end
      #1;
      for (int j = 0; j < M; j++) begin
        int first, count;
        first = -1;
        count = 0;
        for (int i = N - 1; i >= 0; i--)
          if (req[i].valid && int'(req[i].mem) == j) begin
            first = i;
            count++;
          end
        if (count > 1) conflicts++;
        check(mem_req[j] == (first >= 0), $sformatf("mem_req[%0d]", j));
        if (first >= 0)
          check(int'(mem_owner[j]) == first, $sformatf("mem_owner[%0d]=%0d expected %0d", j, mem_owner[j], first));
      end
      for (int i = 0; i < N; i++) begin
        bit exp_win;
        exp_win = req[i].valid && int'(req[i].mem) < M;
        for (int h = 0; h < i; h++)
          if (req[h].valid && req[h].mem == req[i].mem) exp_win = 1'b0;
        check(win[i] == exp_win, $sformatf("win[%0d]=%0b expected %0b", i, win[i], exp_win));
      end
    end
    check(conflicts > 0, "no conflict was exercised");
    $display("conflicts=%0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
