// tb_bypass_mux: checks every source/slot selection of the forwarding multiplexer.
module tb_bypass_mux;
  import vliw_pkg::*;
  fwd_sel_t sel;
  word_t pipe_val, y;
  word_t [NSLOT-1:0] pa, pb;
  int checks = 0, failures = 0;

  bypass_mux dut (.sel, .pipe_val, .path_a (pa), .path_b (pb), .y);

  initial begin
    for (int i = 0; i < 500; i++) begin
      word_t exp;
      pipe_val = $urandom();
      for (int q = 0; q < NSLOT; q++) begin pa[q] = $urandom(); pb[q] = $urandom(); end
      sel.src  = fwd_src_t'($urandom_range(0, 2));
      sel.slot = 2'($urandom_range(0, NSLOT - 1));
      #1;
      exp = (sel.src == SRC_EXEX) ? pa[sel.slot] : (sel.src == SRC_MEMEX) ? pb[sel.slot] : pipe_val;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL src=%0d slot=%0d y=%h exp=%h", sel.src, sel.slot, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
