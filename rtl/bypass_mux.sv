// bypass_mux: operand multiplexer of the forwarding network.
//
// Selects one operand among the value already held by the stage (port pipe_val)
// and the per-slot results held in up to two interstage registers (path_a = the
// EX/MEM register, EX/EX path; path_b = the MEM/WB register, MEM/EX or MEM/ID path).
// sel.src names the source and sel.slot the issue slot within the producing bundle.
// Combinational. The ID-stage instance uses only path_b (MEM/ID path, sel.src is
// SRC_MEMEX or SRC_PIPE); the EX-stage instances use both. The multiplexer placement
// follows the block diagram of the design; the select encoding is this design's own.
module bypass_mux
  import vliw_pkg::*;
(
  input  fwd_sel_t          sel,
  input  word_t             pipe_val,
  input  word_t [NSLOT-1:0] path_a,
  input  word_t [NSLOT-1:0] path_b,
  output word_t             y
);
  always_comb begin
    unique case (sel.src)
      SRC_EXEX:  y = path_a[sel.slot];
      SRC_MEMEX: y = path_b[sel.slot];
      default:   y = pipe_val;
    endcase
  end
endmodule
