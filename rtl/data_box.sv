// data_box: the data switching box of one crosspoint.
//
// When data_c is set the box joins the crosspoint's data port-line to its
// data bus-line. Data moves both ways (write data from processor to memory,
// read data back), and this design has no tri-state nets, so the
// bidirectional data line of the paper is split into two OR-chains:
//   - write plane (_wr): port-line east -> west, bus-line north -> south,
//     like the address lines (processor rows lie above memory rows);
//   - read plane (_rd): port-line east -> west, bus-line south -> north,
//     carrying memory read data up to the processor rows.
// On a processor row (MEM_ROW = 0) the box drives write data onto the bus
// and takes read data off it; on a memory row (MEM_ROW = 1) it does the
// reverse. Purely combinational.
module data_box #(
  parameter int unsigned W       = 32,
  parameter bit          MEM_ROW = 1'b0
) (
  input  logic         data_c,
  // write plane
  input  logic [W-1:0] data_e_wr,
  output logic [W-1:0] data_w_wr,
  input  logic [W-1:0] data_n_wr,
  output logic [W-1:0] data_s_wr,
  // read plane
  input  logic [W-1:0] data_e_rd,
  output logic [W-1:0] data_w_rd,
  input  logic [W-1:0] data_s_rd,
  output logic [W-1:0] data_n_rd
);
  always_comb begin
    if (MEM_ROW) begin
      // memory receives write data, sources read data
      data_s_wr = data_n_wr;
      data_w_wr = data_e_wr | (data_c ? data_n_wr : '0);
      data_n_rd = data_s_rd | (data_c ? data_e_rd : '0);
      data_w_rd = data_e_rd;
    end else begin
      // processor sources write data, receives read data
      data_s_wr = data_n_wr | (data_c ? data_e_wr : '0);
      data_w_wr = data_e_wr;
      data_n_rd = data_s_rd;
      data_w_rd = data_e_rd | (data_c ? data_s_rd : '0);
    end
  end
endmodule
