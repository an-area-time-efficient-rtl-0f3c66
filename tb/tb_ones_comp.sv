// tb_ones_comp: exhaustive check of the conditional 1's complementer at its
// default 8-bit width: with en low the word must pass unchanged, with en
// high it must equal 255 minus the word.
module tb_ones_comp;
  int checks = 0, failures = 0;
  logic [7:0] d, q;
  logic       en;

  ones_comp dut (.d, .en, .q);

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 256; v++) begin
        d = 8'(v); en = 1'(e);
        #1;
        checks++;
        if (q !== (e != 0 ? 8'(255 - v) : 8'(v))) begin
          failures++;
          if (failures < 10) $display("FAIL d=%h en=%0d q=%h", d, en, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
