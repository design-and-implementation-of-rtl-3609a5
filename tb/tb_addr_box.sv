// tb_addr_box: self-checking test of addr_box in both roles.
// Random address/bus values and control settings are applied to a
// processor-row box and a memory-row box; the expected outputs are worked
// out here from the switching rule (a processor row ORs its port-line onto
// the bus-line, a memory row ORs the bus-line onto its port-line, both only
// while addr_c is set). The box is combinational, so results are checked in
// the same cycle the inputs change.
module tb_addr_box;
  localparam int unsigned W = 17;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         c;
  logic [W-1:0] e, n;
  logic [W-1:0] pw, ps, mw, ms;

  addr_box #(.W(W), .MEM_ROW(1'b0)) u_proc (.addr_c(c), .addr_e(e), .addr_w(pw), .addr_n(n), .addr_s(ps));
  addr_box #(.W(W), .MEM_ROW(1'b1)) u_mem  (.addr_c(c), .addr_e(e), .addr_w(mw), .addr_n(n), .addr_s(ms));

  task automatic expect_eq(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    c = 0; e = '0; n = '0;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      c = 1'($urandom);
      e = W'($urandom);
      // the bus is usually idle when a processor drives it, sometimes not
      n = ($urandom % 3 == 0) ? W'($urandom) : '0;
      #1;
      expect_eq(pw, e,                      "proc row port-line pass");
      expect_eq(ps, c ? (n | e) : n,        "proc row bus-line");
      expect_eq(ms, n,                      "mem row bus-line pass");
      expect_eq(mw, c ? (e | n) : e,        "mem row port-line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
