// tb_crosspoint: self-checking test of one crosspoint (addr_box + data_box).
// A processor-row crosspoint and a memory-row crosspoint are stacked on the
// same bus-line, as in a connection through the crossbar. With both
// crosspoints closed, the processor's address and write data must appear on
// the memory port-line and the memory's read data on the processor
// port-line; addr_c and data_c are driven separately to check that each
// steers only its own box. Combinational: checked in the same cycle.
module tb_crosspoint;
  localparam int unsigned AW = 17, DW = 32;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          ac, dc;
  logic [AW-1:0] p_addr, m_addr, bus_a, bus_a_end, p_addr_w;
  logic [DW-1:0] p_wd, m_wd, bus_w, bus_w_end, p_wd_w;
  logic [DW-1:0] m_rd, p_rd, bus_r, bus_r_top, m_rd_w;

  // processor row, upper
  crosspoint #(.AW(AW), .DW(DW), .MEM_ROW(1'b0)) u_p (
    .addr_c(ac), .data_c(dc),
    .addr_e(p_addr), .addr_w(p_addr_w), .addr_n('0), .addr_s(bus_a),
    .data_e_wr(p_wd), .data_w_wr(p_wd_w), .data_n_wr('0), .data_s_wr(bus_w),
    .data_e_rd('0), .data_w_rd(p_rd), .data_s_rd(bus_r), .data_n_rd(bus_r_top));
  // memory row, lower
  crosspoint #(.AW(AW), .DW(DW), .MEM_ROW(1'b1)) u_m (
    .addr_c(ac), .data_c(dc),
    .addr_e('0), .addr_w(m_addr), .addr_n(bus_a), .addr_s(bus_a_end),
    .data_e_wr('0), .data_w_wr(m_wd), .data_n_wr(bus_w), .data_s_wr(bus_w_end),
    .data_e_rd(m_rd), .data_w_rd(m_rd_w), .data_s_rd('0), .data_n_rd(bus_r));

  task automatic expect_eq(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
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
    ac = 0; dc = 0; p_addr = '0; p_wd = '0; m_rd = '0;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      ac     = 1'($urandom);
      dc     = 1'($urandom);
      p_addr = AW'($urandom);
      p_wd   = $urandom;
      m_rd   = $urandom;
      #1;
      expect_eq(DW'(m_addr),    ac ? DW'(p_addr) : '0, "address at memory");
      expect_eq(DW'(bus_a_end), ac ? DW'(p_addr) : '0, "address bus-line below");
      expect_eq(DW'(p_addr_w),  DW'(p_addr),           "processor address line pass");
      expect_eq(m_wd,           dc ? p_wd : '0,        "write data at memory");
      expect_eq(bus_w_end,      dc ? p_wd : '0,        "write bus-line below");
      expect_eq(p_wd_w,         p_wd,                  "processor write line pass");
      expect_eq(p_rd,           dc ? m_rd : '0,        "read data at processor");
      expect_eq(bus_r_top,      dc ? m_rd : '0,        "read bus-line above");
      expect_eq(m_rd_w,         m_rd,                  "memory read line pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
