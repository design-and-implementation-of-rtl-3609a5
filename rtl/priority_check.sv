// priority_check: resolves conflicts between processors that request the
// same memory module in the same cycle.
//
// Every valid request naming an existing module (mem < M) competes for that
// module; the lowest-numbered processor wins and the others lose for this
// cycle (losing requests are dropped, as in the bandwidth model where
// rejected requests are discarded). The paper names this function but
// not its rule: fixed priority by processor number is this design's choice.
// Outputs: win[i] for each processor, and per memory module whether it was
// requested and by which winner. Purely combinational.
module priority_check
  import xbar_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4
) (
  input  req_t [N-1:0]                  req,
  output logic [N-1:0]                  win,
  output logic [M-1:0]                  mem_req,
  output logic [M-1:0][$clog2(N+1)-1:0] mem_owner
);
  always_comb begin
    win       = '0;
    mem_req   = '0;
    mem_owner = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (req[i].valid && req[i].mem < MAX_MEM_W'(M)) begin
        if (!mem_req[int'(req[i].mem)]) begin
          mem_req[int'(req[i].mem)]   = 1'b1;
          mem_owner[int'(req[i].mem)] = ($clog2(N+1))'(i);
          win[i]                = 1'b1;
        end
      end
    end
  end
endmodule
