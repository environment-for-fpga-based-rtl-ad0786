// tb_tv_cmp - exhaustive check of the three-valued comparator on two
// outputs: a detection needs a known, different value on some output.
module tb_tv_cmp;
  import tv_pkg::*;
  tv_t [1:0] cut_po, gold_po;
  logic differ;
  int checks = 0, failures = 0;
  tv_t vals[3] = '{TV_0, TV_1, TV_X};

  tv_cmp #(.WIDTH(2)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 81; a++) begin
      logic exp;
      cut_po[0]  = vals[a % 3];
      cut_po[1]  = vals[(a / 3) % 3];
      gold_po[0] = vals[(a / 9) % 3];
      gold_po[1] = vals[(a / 27) % 3];
      exp = 0;
      for (int i = 0; i < 2; i++)
        if (cut_po[i] != TV_X && gold_po[i] != TV_X && cut_po[i] != gold_po[i]) exp = 1;
      #1;
      checks++;
      if (differ !== exp) begin failures++; $display("FAIL case %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
