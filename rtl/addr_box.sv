// addr_box: the address switching box of one crosspoint.
//
// When addr_c is set the box joins the crosspoint's port-line to its
// bus-line for the address (and write-mode) signals. The paper draws
// these lines as bidirectional wires; this design has no tri-state nets, so
// each line is an OR-chain with a fixed direction of flow:
//   - the port-line enters on the east side (addr_e) and leaves on the
//     west side (addr_w);
//   - the bus-line enters on the north side (addr_n) and leaves on the
//     south side (addr_s); processor rows lie above memory rows, so
//     addresses flow down a bus-line from processors to memories.
// On a processor row (MEM_ROW = 0) the box ORs the processor's address onto
// the bus-line; on a memory row (MEM_ROW = 1) it ORs the bus-line onto the
// memory's port-line. Because the arbiter never puts two sources on one
// line, OR-ing is the same as switching. Purely combinational.
module addr_box #(
  parameter int unsigned W       = 17,
  parameter bit          MEM_ROW = 1'b0
) (
  input  logic         addr_c,
  input  logic [W-1:0] addr_e,
  output logic [W-1:0] addr_w,
  input  logic [W-1:0] addr_n,
  output logic [W-1:0] addr_s
);
  always_comb begin
    if (MEM_ROW) begin
      addr_s = addr_n;
      addr_w = addr_e | (addr_c ? addr_n : '0);
    end else begin
      addr_s = addr_n | (addr_c ? addr_e : '0);
      addr_w = addr_e;
    end
  end
endmodule
