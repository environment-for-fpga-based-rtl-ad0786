// tb_fault_decoder - checks every code of a 17-point and a 32-point decoder
// with enable high and low: exactly the named point, or none.
module tb_fault_decoder;
  logic en;
  logic [4:0] code;
  logic [16:0] sel17;
  logic [31:0] sel32;
  int checks = 0, failures = 0;

  fault_decoder #(.NUM(17)) d17 (.en, .code, .sel(sel17));
  fault_decoder #(.NUM(32), .GROUP(8)) d32 (.en, .code, .sel(sel32));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < 32; c++) begin
        logic [16:0] exp17;
        logic [31:0] exp32;
        en = e[0]; code = 5'(c);
        #1;
        exp17 = (e && c < 17) ? 17'(1) << c : '0;
        exp32 = e ? 32'(1) << c : '0;
        checks += 2;
        if (sel17 !== exp17) begin failures++; $display("FAIL 17 en=%0d code=%0d sel=%b", e, c, sel17); end
        if (sel32 !== exp32) begin failures++; $display("FAIL 32 en=%0d code=%0d", e, c); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
