// tb_fault_point - exhaustive check of the fault injection multiplexer.
module tb_fault_point;
  logic net_in, select, stuck, net_out;
  int checks = 0, failures = 0;

  fault_point dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {net_in, select, stuck} = 3'(i);
      #1;
      checks++;
      if (net_out !== (select ? stuck : net_in)) begin
        failures++; $display("FAIL in=%b sel=%b stuck=%b out=%b", net_in, select, stuck, net_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
