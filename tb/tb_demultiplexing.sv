// tb_demultiplexing: self-checking test of the control decoder.
// Random row_act/row_bus settings for 8 port-lines and 4 bus-lines; every
// crosspoint control must be set exactly when its row is active and its
// bus-line is the one the row was given. Combinational: checked at once.
module tb_demultiplexing;
  localparam int unsigned R = 8, NB = 4, BW = 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [R-1:0]          row_act;
  logic [R-1:0][BW-1:0]  row_bus;
  logic [R-1:0][NB-1:0]  addr_c, data_c;

  demultiplexing #(.R(R), .NB(NB)) u_dut (
    .row_act(row_act), .row_bus(row_bus), .addr_c(addr_c), .data_c(data_c));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_act = '0; row_bus = '0;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      row_act = R'($urandom);
      row_bus = (R*BW)'($urandom);
      #1;
      for (int r = 0; r < R; r++) begin
        logic [NB-1:0] exp;
        exp = row_act[r] ? (NB'(1) << row_bus[r]) : '0;
        checks += 2;
        if (addr_c[r] !== exp) begin
          failures++;
          $display("FAIL addr_c[%0d] = %b expected %b", r, addr_c[r], exp);
        end
        if (data_c[r] !== exp) begin
          failures++;
          $display("FAIL data_c[%0d] = %b expected %b", r, data_c[r], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
