// tb_host_if - checks the host register interface: register writes and
// read-back, the start pulse, writes ignored while busy, the sticky done
// flag, the cycle counter read-out and the report stream forwarding.
module tb_host_if;
  import fe_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [2:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic host_rep_valid, host_rep_ready = 0;
  report_t host_rep_data;
  logic [3:0] seed, poly;
  run_cfg_t cfg;
  logic start, busy = 0, done = 0;
  logic [CYCLE_W-1:0] cycles = 32'd12345;
  logic rep_valid = 0, rep_ready;
  report_t rep_data = '0;
  int checks = 0, failures = 0;

  host_if #(.WIDTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input int a, input int d);
    wr_en = 1; wr_addr = 3'(a); wr_data = 32'(d);
    @(posedge clk); #1;
    wr_en = 0;
  endtask

  initial begin
    #12 rst_n = 1;
    @(posedge clk); #1;
    write(0, 'h9); write(1, 'hC); write(2, 34); write(3, 7); write(4, 300);
    check(seed == 4'h9 && poly == 4'hC, "seed and polynomial");
    check(cfg.num_faults == 34 && cfg.num_seq == 7 && cfg.seq_len == 300, "run configuration");
    rd_addr = 0; #1 check(rd_data == 32'h9, "read seed");
    rd_addr = 2; #1 check(rd_data == 34, "read faults");
    rd_addr = 4; #1 check(rd_data == 300, "read vectors per sequence");
    rd_addr = 6; #1 check(rd_data == 12345, "read cycles");
    check(!start, "no start yet");
    write(5, 1);
    check(start, "start pulse");
    @(posedge clk); #1;
    check(!start, "start is one cycle");
    busy = 1;
    write(0, 'h3);
    check(seed == 4'h9, "write ignored while busy");
    rd_addr = 5; #1 check(rd_data == 32'b01, "status busy");
    // Report stream passes through both ways.
    for (int i = 0; i < 20; i++) begin
      rep_valid = 1'($urandom); host_rep_ready = 1'($urandom);
      rep_data = '{fault: cnt_t'($urandom), detected: 1'($urandom), seq: cnt_t'($urandom), vec: cnt_t'($urandom)};
      #1;
      check(host_rep_valid == rep_valid && rep_ready == host_rep_ready && host_rep_data == rep_data,
            "report forwarding");
    end
    done = 1; @(posedge clk); #1; done = 0; busy = 0;
    @(posedge clk); #1;
    rd_addr = 5; #1 check(rd_data == 32'b10, "done flag sticky");
    write(5, 1);
    @(posedge clk); #1;
    rd_addr = 5; #1 check(rd_data == 32'b00, "done flag cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
