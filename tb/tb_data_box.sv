// tb_data_box: self-checking test of data_box in both roles.
// Random values on both data planes; the expected outputs follow the rule
// that a processor row drives write data down the bus-line and takes read
// data off it, a memory row does the opposite, and nothing is switched while
// data_c is clear. Combinational: checked in the same cycle.
module tb_data_box;
  localparam int unsigned W = 32;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         c;
  logic [W-1:0] ewr, nwr, erd, srd;
  logic [W-1:0] p_wwr, p_swr, p_wrd, p_nrd;
  logic [W-1:0] m_wwr, m_swr, m_wrd, m_nrd;

  data_box #(.W(W), .MEM_ROW(1'b0)) u_proc (
    .data_c(c), .data_e_wr(ewr), .data_w_wr(p_wwr), .data_n_wr(nwr), .data_s_wr(p_swr),
    .data_e_rd(erd), .data_w_rd(p_wrd), .data_s_rd(srd), .data_n_rd(p_nrd));
  data_box #(.W(W), .MEM_ROW(1'b1)) u_mem (
    .data_c(c), .data_e_wr(ewr), .data_w_wr(m_wwr), .data_n_wr(nwr), .data_s_wr(m_swr),
    .data_e_rd(erd), .data_w_rd(m_wrd), .data_s_rd(srd), .data_n_rd(m_nrd));

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
    c = 0; ewr = '0; nwr = '0; erd = '0; srd = '0;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      c   = 1'($urandom);
      ewr = $urandom;
      erd = $urandom;
      nwr = ($urandom % 3 == 0) ? $urandom : '0;
      srd = ($urandom % 3 == 0) ? $urandom : '0;
      #1;
      // processor row
      expect_eq(p_wwr, ewr,                   "proc wr port-line pass");
      expect_eq(p_swr, c ? (nwr | ewr) : nwr, "proc wr bus-line");
      expect_eq(p_nrd, srd,                   "proc rd bus-line pass");
      expect_eq(p_wrd, c ? (erd | srd) : erd, "proc rd port-line");
      // memory row
      expect_eq(m_swr, nwr,                   "mem wr bus-line pass");
      expect_eq(m_wwr, c ? (ewr | nwr) : ewr, "mem wr port-line");
      expect_eq(m_nrd, c ? (srd | erd) : srd, "mem rd bus-line");
      expect_eq(m_wrd, erd,                   "mem rd port-line pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
