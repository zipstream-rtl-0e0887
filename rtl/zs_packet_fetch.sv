// zs_packet_fetch: streams consecutive 16-bit packets out of the block RAM.
//
// After `start` it reads addresses base, base+1, ... through the RAM's
// one-cycle read port and keeps up to FIFO_DEPTH packets in a small buffer,
// issuing a read only when the buffer has room for it. With a four-deep
// buffer the output can deliver one packet per clock. pkt_* is a valid/ready
// stream. Reading continues past the end of the image; the consumer stops
// taking packets when it has what it needs. `start` also empties the buffer.
module zs_packet_fetch
  import zs_pkg::*;
#(
  parameter int unsigned AW         = 10,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  input  logic [AW-1:0]    base,
  output logic             re,
  output logic [AW-1:0]    raddr,
  input  logic [PKT_W-1:0] rdata,
  output logic [PKT_W-1:0] pkt_data,
  output logic             pkt_valid,
  input  logic             pkt_ready
);

  localparam int unsigned PW = $clog2(FIFO_DEPTH);

  logic [PKT_W-1:0] fifo [FIFO_DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [PW:0]      count;
  logic             inflight;     // a read was issued last cycle
  logic             active;
  logic             pop;
  logic [AW-1:0]    addr_q;

  assign pkt_valid = (count != '0) && !start;
  assign pkt_data  = fifo[rd_ptr];
  assign pop       = pkt_valid && pkt_ready;
  // Room for one more packet after this cycle's pop and the read in flight.
  assign re        = active && !stop && !start &&
                     (32'(count) + 32'(inflight) - 32'(pop) < FIFO_DEPTH);
  assign raddr     = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      inflight <= 1'b0;
      active   <= 1'b0;
      addr_q   <= '0;
    end else if (start) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      inflight <= 1'b0;
      active   <= 1'b1;
      addr_q   <= base;
    end else begin
      if (stop) active <= 1'b0;
      inflight <= re;
      if (re) addr_q <= addr_q + 1'b1;
      if (inflight) begin
        fifo[wr_ptr] <= rdata;
        wr_ptr       <= wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (PW+1)'(inflight) - (PW+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= (PW+1)'(FIFO_DEPTH));

endmodule
