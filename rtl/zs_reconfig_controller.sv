// zs_reconfig_controller: the reconfiguration controller (RC) of ZipStream.
//
// On a request for partition req_part it streams the partial bitstream of req_len words from the
// external memory to the ICAP. After the last word it waits for the ICAP's
// end-of-configuration CRC result. If the CRC passed, the result is RES_OK.
// If it failed, the partition may have broken static routes, so the RC
// starts the decompressor on that partition's black box and streams the decoded black-box bitstream into
// the ICAP; after that CRC the result is RES_RECOVERED, or RES_FAILED if the
// black-box load also failed (no further retry) or the decompressor found the
// stored image corrupt (dec_error). `done` pulses with the
// result. The recovery policy is the published one; the state machine,
// handshakes and result encoding are this design's own.
//
// Interfaces: ext_start pulses to start the external stream; ext_* and the
// decompressor words are valid/ready streams that are passed to the ICAP
// write port unchanged, one word per clock while icap_busy is low. The ICAP
// CRC outcome arrives as icap_done with icap_crc_err. A source must hold an
// offered word until it is taken, as the ICAP needs stable data while busy.
module zs_reconfig_controller
  import zs_pkg::*;
#(
  parameter int unsigned NUM_PARTS = 4,
  localparam int unsigned PART_W   = (NUM_PARTS > 1) ? $clog2(NUM_PARTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // request
  input  logic              req,
  input  logic [PART_W-1:0] req_part,   // partition to reconfigure
  input  logic [31:0]       req_len,
  output logic              busy,
  output logic              done,
  output rc_result_t        result,
  // external memory stream
  output logic              ext_start,
  input  logic [WORD_W-1:0] ext_data,
  input  logic              ext_valid,
  output logic              ext_ready,
  // decompressor
  output logic              dec_start,
  output logic [PART_W-1:0] dec_part,   // black box to decode
  input  logic [WORD_W-1:0] dec_data,
  input  logic              dec_valid,
  input  logic              dec_last,
  input  logic              dec_error,
  output logic              dec_ready,
  // ICAP
  output logic [WORD_W-1:0] icap_data,
  output logic              icap_write,
  output logic              icap_last,
  input  logic              icap_busy,
  input  logic              icap_done,
  input  logic              icap_crc_err,
  // observation
  output logic              recovering
);

  typedef enum logic [2:0] {
    S_IDLE, S_EXT, S_EXT_WAIT, S_BB_START, S_BB, S_BB_WAIT
  } rc_state_t;

  rc_state_t   state;
  logic [31:0] len_q;
  logic [PART_W-1:0] part_q;
  logic [31:0] sent;
  logic        ext_fire, dec_fire;

  assign busy       = (state != S_IDLE);
  assign recovering = (state == S_BB_START || state == S_BB || state == S_BB_WAIT);
  assign ext_start  = (state == S_IDLE) && req && (req_len != '0);
  assign dec_start  = (state == S_BB_START);
  assign dec_part   = part_q;

  always_comb begin
    icap_data  = '0;
    icap_write = 1'b0;
    icap_last  = 1'b0;
    ext_ready  = 1'b0;
    dec_ready  = 1'b0;
    if (state == S_EXT) begin
      icap_data  = ext_data;
      icap_write = ext_valid;
      icap_last  = (sent == len_q - 1);
      ext_ready  = !icap_busy;
    end else if (state == S_BB) begin
      icap_data  = dec_data;
      icap_write = dec_valid;
      icap_last  = dec_last;
      dec_ready  = !icap_busy;
    end
  end

  assign ext_fire = (state == S_EXT) && ext_valid && !icap_busy;
  assign dec_fire = (state == S_BB)  && dec_valid && !icap_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      len_q  <= '0;
      part_q <= '0;
      sent   <= '0;
      done   <= 1'b0;
      result <= RES_NONE;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req && req_len != '0) begin   // empty requests are ignored
          len_q  <= req_len;
          part_q <= req_part;
          sent   <= '0;
          state <= S_EXT;
        end
        S_EXT: if (ext_fire) begin
          sent <= sent + 1;
          if (sent == len_q - 1) state <= S_EXT_WAIT;
        end
        S_EXT_WAIT: if (icap_done) begin
          if (icap_crc_err) state <= S_BB_START;
          else begin
            state  <= S_IDLE;
            result <= RES_OK;
            done   <= 1'b1;
          end
        end
        S_BB_START: state <= S_BB;
        S_BB: if (dec_fire && dec_last) state <= S_BB_WAIT;
              else if (dec_error) begin   // image corrupt: nothing more to load
                state  <= S_IDLE;
                result <= RES_FAILED;
                done   <= 1'b1;
              end
        S_BB_WAIT: if (icap_done) begin
          state  <= S_IDLE;
          result <= icap_crc_err ? RES_FAILED : RES_RECOVERED;
          done   <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Held data must not change while the ICAP is busy.
  a_icap_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                icap_write && icap_busy |=> icap_write && $stable(icap_data));

endmodule
