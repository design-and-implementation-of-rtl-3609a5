// tb_bandwidth: effective-bandwidth workload for N = M = 2, 4, 8, 12, 16
// with request rates p = 0.5 and 1.0.
// For every size, four crossbar_model instances share the same random
// request stream: the one-sided switch, the modified switch with g = 2,
// the ripple K switch with K = B/2, and the modified switch with g = B
// (the two-sided pattern). Each cycle every processor requests with
// probability p a uniformly chosen memory module; rejected requests are
// dropped and a new request is drawn next cycle. The bandwidth is the mean
// number of grants per cycle. Checks:
//   - all four topologies grant exactly the same requests every cycle (they
//     are all nonblocking);
//   - the measured bandwidth is within 0.1 + 2 % of the published figures
//     0.88/1.50, 1.66/2.73, 3.23/5.25, 4.80/7.78, 6.37/10.30, which follow
//     BW = B(1 - (1 - p/M)^N).
module tb_bandwidth;
  import xbar_pkg::*;
  localparam int unsigned NS = 5, NT = 4, AW = 4, DW = 4, CYC = 4000;
  localparam int unsigned SZ [NS] = '{2, 4, 8, 12, 16};
  localparam real PUB [NS][2] = '{'{0.88, 1.50}, '{1.66, 2.73}, '{3.23, 5.25},
                                  '{4.80, 7.78}, '{6.37, 10.30}};

  int checks = 0, failures = 0, done = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3 * CYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < NS; s++) begin : g_size
    localparam int unsigned N = SZ[s], M = SZ[s], NB = SZ[s];
    req_t [N-1:0]         req;
    logic [N-1:0]         grant [NT];
    logic [N-1:0][AW-1:0] addr_p;
    logic [N-1:0][DW-1:0] wdata_p;
    logic [M-1:0][DW-1:0] rdata_m;

    assign addr_p  = '0;
    assign wdata_p = '0;
    assign rdata_m = '0;

    for (genvar t = 0; t < NT; t++) begin : g_topo
      localparam topo_e       TOPO = (t == 0) ? TOPO_ONE_SIDED : (t == 2) ? TOPO_RIPPLE : TOPO_MODIFIED;
      localparam int unsigned G    = (t == 3) ? NB : 2;
      localparam int unsigned K    = (NB / 2 > 0) ? NB / 2 : 1;
      logic [N-1:0][DW-1:0] rdata_p;
      logic [M-1:0]         mem_sel, mem_we;
      logic [M-1:0][AW-1:0] addr_m;
      logic [M-1:0][DW-1:0] wdata_m;
      crossbar_model #(.N(N), .M(M), .TOPO(TOPO), .G(G), .K(K), .ADDR_W(AW), .DATA_W(DW)) u_dut (
        .req(req), .xp_fault('0), .grant(grant[t]), .addr_p(addr_p), .wdata_p(wdata_p),
        .rdata_p(rdata_p), .mem_sel(mem_sel), .mem_we(mem_we), .addr_m(addr_m),
        .wdata_m(wdata_m), .rdata_m(rdata_m));
    end

    initial begin
      req = '0;
      for (int pi = 0; pi < 2; pi++) begin
        int unsigned p_milli;
        longint total;
        real bw, eq1;
        p_milli = (pi == 0) ? 500 : 1000;
        total = 0;
        for (int c = 0; c < CYC; c++) begin
          @(negedge clk);
          for (int i = 0; i < N; i++) begin
            req[i].valid = ($urandom % 1000) < p_milli;
            req[i].write = 1'b0;
            req[i].mem   = MAX_MEM_W'($urandom % M);
          end
          #1;
          for (int t = 1; t < NT; t++)
            check(grant[t] == grant[0], $sformatf("N=M=%0d: topology %0d grants %b, one-sided %b",
                                                  N, t, grant[t], grant[0]));
          total += $countones(grant[0]);
        end
        bw  = real'(total) / real'(CYC);
        eq1 = real'(NB) * (1.0 - (1.0 - (real'(p_milli) / 1000.0) / real'(M)) ** real'(N));
        $display("N=M=B=%0d p=%0.1f: measured BW %0.3f, published %0.2f, B(1-(1-p/M)^N) = %0.3f",
                 N, real'(p_milli) / 1000.0, bw, PUB[s][pi], eq1);
        check(bw > PUB[s][pi] * 0.98 - 0.1 && bw < PUB[s][pi] * 1.02 + 0.1,
              $sformatf("N=M=%0d p=%0d/1000: bandwidth %0.3f far from %0.2f", N, p_milli, bw, PUB[s][pi]));
      end
      done++;
    end
  end

  initial begin
    wait (done == NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
