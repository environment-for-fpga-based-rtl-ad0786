// host_if - register interface between the emulation test bench and a host.
//
// The host writes the stimulus (LFSR seed and feedback polynomial) and the
// run size, starts a run, polls status, and drains the list of detected and
// undetected faults as a stream of reports.
//
// Write port (one write per clock with wr_en):
//   addr 0 seed        addr 1 feedback polynomial
//   addr 2 faults      addr 3 sequences per fault   addr 4 vectors per sequence
//   addr 5 control: writing bit 0 = 1 starts a run
// Configuration writes are ignored while a run is busy.
// Read port (combinational): addresses 0-4 read back the registers,
//   addr 5 status {done, busy} in bits [1:0] (done stays set until the next
//   start), addr 6 emulated cycles of the current or last run.
// Report stream: the controller's valid/ready report is forwarded to the
// host unchanged, so the host's `rep_ready` paces the emulation.
// Registers reset to zero (a zero seed is the host's responsibility).
// Which values cross the interface follows the environment; the register
// map and handshake are this design's choice.
module host_if
  import fe_pkg::*;
#(
  parameter int unsigned WIDTH = 4     // LFSR width (CUT inputs)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host side
  input  logic               wr_en,
  input  logic [2:0]         wr_addr,
  input  logic [31:0]        wr_data,
  input  logic [2:0]         rd_addr,
  output logic [31:0]        rd_data,
  output logic               host_rep_valid,
  input  logic               host_rep_ready,
  output report_t            host_rep_data,
  // environment side
  output logic [WIDTH-1:0]   seed,
  output logic [WIDTH-1:0]   poly,
  output run_cfg_t           cfg,
  output logic               start,
  input  logic               busy,
  input  logic               done,
  input  logic [CYCLE_W-1:0] cycles,
  input  logic               rep_valid,
  output logic               rep_ready,
  input  report_t            rep_data
);
  logic done_flag;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      seed      <= '0;
      poly      <= '0;
      cfg       <= '0;
      start     <= 1'b0;
      done_flag <= 1'b0;
    end else begin
      start <= 1'b0;
      if (wr_en && !busy) begin
        unique case (wr_addr)
          3'd0: seed           <= wr_data[WIDTH-1:0];
          3'd1: poly           <= wr_data[WIDTH-1:0];
          3'd2: cfg.num_faults <= cnt_t'(wr_data);
          3'd3: cfg.num_seq    <= cnt_t'(wr_data);
          3'd4: cfg.seq_len    <= cnt_t'(wr_data);
          3'd5: start          <= wr_data[0];
          default: ;
        endcase
      end
      if (start)     done_flag <= 1'b0;
      else if (done) done_flag <= 1'b1;
    end

  always_comb begin
    unique case (rd_addr)
      3'd0:    rd_data = 32'(seed);
      3'd1:    rd_data = 32'(poly);
      3'd2:    rd_data = 32'(cfg.num_faults);
      3'd3:    rd_data = 32'(cfg.num_seq);
      3'd4:    rd_data = 32'(cfg.seq_len);
      3'd5:    rd_data = {30'd0, done_flag, busy};
      3'd6:    rd_data = 32'(cycles);
      default: rd_data = '0;
    endcase
  end

  always_comb begin
    host_rep_valid = rep_valid;
    host_rep_data  = rep_data;
    rep_ready      = host_rep_ready;
  end
endmodule
