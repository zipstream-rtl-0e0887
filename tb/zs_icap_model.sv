// zs_icap_model: behavioural model of the FPGA's configuration access port.
//
// Not synthesizable logic: it stands for the vendor's hard ICAP in the
// testbenches. It accepts a word on each clock where icap_write is high and
// icap_busy low, and keeps every accepted word in `log` (the configuration
// memory as written). icap_busy is raised at random with probability
// busy_pct percent. When the word flagged icap_last arrives it checks that
// this word equals the CRC-32C of the load's preceding words and, DONE_DELAY
// clocks later, pulses icap_done with icap_crc_err set on a mismatch.
module zs_icap_model
  import zs_tb_pkg::*;
#(
  parameter int unsigned DONE_DELAY = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] icap_data,
  input  logic        icap_write,
  input  logic        icap_last,
  output logic        icap_busy,
  output logic        icap_done,
  output logic        icap_crc_err
);

  word_q_t     log;          // every word written
  word_q_t     load;         // words of the current load
  int unsigned busy_pct  = 0;
  int unsigned loads     = 0;
  int unsigned crc_errors = 0;
  int unsigned busy_stalls = 0;
  int          countdown = -1;
  logic        err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icap_busy    <= 1'b0;
      icap_done    <= 1'b0;
      icap_crc_err <= 1'b0;
      countdown    <= -1;
      err_q        <= 1'b0;
    end else begin
      icap_done    <= 1'b0;
      icap_crc_err <= 1'b0;
      icap_busy    <= (busy_pct != 0) && (($urandom % 100) < busy_pct);
      if (icap_write && icap_busy) busy_stalls <= busy_stalls + 1;
      if (icap_write && !icap_busy) begin
        log.push_back(icap_data);
        load.push_back(icap_data);
        if (icap_last) begin
          err_q     <= (crc32c(load, load.size() - 1) != icap_data);
          countdown <= DONE_DELAY;
          load.delete();
        end
      end
      if (countdown == 0) begin
        icap_done    <= 1'b1;
        icap_crc_err <= err_q;
        loads        <= loads + 1;
        if (err_q) crc_errors <= crc_errors + 1;
      end
      if (countdown >= 0) countdown <= countdown - 1;
    end
  end

endmodule
