// tb_cmp - checks the parallel comparator on random and equal output words.
module tb_cmp;
  logic [5:0] cut_po, gold_po;
  logic differ;
  int checks = 0, failures = 0;

  cmp #(.WIDTH(6)) dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      gold_po = 6'($urandom);
      case (i % 3)
        0: cut_po = gold_po;
        1: cut_po = gold_po ^ (6'd1 << $urandom_range(0, 5));
        default: cut_po = 6'($urandom);
      endcase
      #1;
      checks++;
      if (differ !== (cut_po != gold_po)) begin
        failures++; $display("FAIL %b %b -> %b", cut_po, gold_po, differ);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
