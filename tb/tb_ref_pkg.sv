// tb_ref_pkg: reference data shared by the crossbar testbenches.
// Crosspoint patterns of the 4 x 4 switches, read off the published
// drawings rather than computed: bit b of a mask is set when the memory
// row has a crosspoint on bus-line b. Processor rows have all four.
//   modified, g = 2 : memories 0,1 on bus-lines 0,1; memories 2,3 on 2,3
//   ripple, K = 3   : memory j on bus-lines j, j+1, j+2 (mod 4)
package tb_ref_pkg;
  import xbar_pkg::*;

  function automatic logic [3:0] mem_mask4(topo_e topo, int unsigned j);
    case (topo)
      TOPO_MODIFIED: return (j < 2) ? 4'b0011 : 4'b1100;
      TOPO_RIPPLE: begin
        case (j)
          0:       return 4'b0111;
          1:       return 4'b1110;
          2:       return 4'b1101;
          default: return 4'b1011;
        endcase
      end
      default: return 4'b1111;
    endcase
  endfunction

  // Index of a topology in the testbenches' instance arrays.
  function automatic topo_e topo_of(int unsigned t);
    case (t)
      0:       return TOPO_ONE_SIDED;
      1:       return TOPO_MODIFIED;
      default: return TOPO_RIPPLE;
    endcase
  endfunction
endpackage
