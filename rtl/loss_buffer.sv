// loss_buffer: packet buffer that keeps wired-side traffic during mode switching.
//
// While the handshake runs, nothing but protocol packets goes over the air,
// so packets arriving from the Ethernet side are held here (the second 2 MB
// SRAM bank) and sent once the node is back in the normal state. Bytes are
// written in a circular byte array of DEPTH entries. A packet becomes
// visible to the reader only when its last byte has been written: its length
// is then pushed into a length FIFO of LEN_DEPTH entries. When the array or
// the length FIFO is full, the packet being written is dropped whole (the
// write pointer returns to the start of the packet) and `overflow_cnt` counts
// it. The input has no back-pressure, like an Ethernet receiver.
// Read side: `pkt_avail` and `head_len` describe the oldest packet;
// `rd_data` is its next byte (asynchronous read) and `rd_ready` consumes it.
// The 2 MB size follows the original system; the byte organisation, the length
// FIFO, its depth and the whole-packet drop on overflow are this design's
// choices.
module loss_buffer #(
  parameter int unsigned DEPTH     = 2 * 1024 * 1024,
  parameter int unsigned LEN_DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        in_last,
  output logic        pkt_avail,
  output logic [15:0] head_len,
  output logic        rd_valid,
  output logic [7:0]  rd_data,
  input  logic        rd_ready,
  output logic [31:0] level,
  output logic [15:0] pkt_count,
  output logic [31:0] overflow_cnt,
  output logic        ev_overflow
);
  localparam int AW = $clog2(DEPTH);
  localparam int LW = $clog2(LEN_DEPTH);

  logic [7:0]  mem  [DEPTH];
  logic [15:0] lenq [LEN_DEPTH];

  logic [AW-1:0] wr_ptr, commit_ptr, rd_ptr;
  logic [LW:0]   lq_wr, lq_rd;
  logic [15:0]   wr_len, rd_cnt;
  logic          dropping;

  wire [AW-1:0] wr_nxt   = (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + AW'(1);
  wire [AW-1:0] rd_nxt   = (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + AW'(1);
  wire          mem_full = (wr_nxt == rd_ptr);
  wire          lq_full  = (lq_wr - lq_rd) == (LW+1)'(LEN_DEPTH);
  wire          lq_empty = (lq_wr == lq_rd);
  wire          wr_take  = in_valid && !dropping && !mem_full && (wr_len != 16'hFFFF)
                           && !(in_last && lq_full);
  wire          wr_fail  = in_valid && !dropping && !wr_take;
  wire          rd_fire  = rd_valid && rd_ready;
  wire          rd_done  = rd_fire && (rd_cnt == head_len - 16'd1);

  assign pkt_avail = !lq_empty;
  assign head_len  = lenq[lq_rd[LW-1:0]];
  assign rd_valid  = !lq_empty;
  assign rd_data   = mem[rd_ptr];
  assign pkt_count = 16'(lq_wr - lq_rd);
  assign level     = (commit_ptr >= rd_ptr) ? 32'(commit_ptr - rd_ptr)
                                            : 32'(DEPTH) - 32'(rd_ptr - commit_ptr);

  always_ff @(posedge clk) begin
    if (wr_take) mem[wr_ptr] <= in_data;
    if (wr_take && in_last) lenq[lq_wr[LW-1:0]] <= wr_len + 16'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr       <= '0;
      commit_ptr   <= '0;
      rd_ptr       <= '0;
      lq_wr        <= '0;
      lq_rd        <= '0;
      wr_len       <= '0;
      rd_cnt       <= '0;
      dropping     <= 1'b0;
      overflow_cnt <= '0;
      ev_overflow  <= 1'b0;
    end else begin
      ev_overflow <= 1'b0;
      // write side
      if (wr_take) begin
        if (in_last) begin
          wr_ptr     <= wr_nxt;
          commit_ptr <= wr_nxt;
          lq_wr      <= lq_wr + (LW+1)'(1);
          wr_len     <= '0;
        end else begin
          wr_ptr <= wr_nxt;
          wr_len <= wr_len + 16'd1;
        end
      end else if (wr_fail) begin
        wr_ptr       <= commit_ptr;
        wr_len       <= '0;
        dropping     <= !in_last;
        overflow_cnt <= overflow_cnt + 32'd1;
        ev_overflow  <= 1'b1;
      end else if (in_valid && dropping && in_last) begin
        dropping <= 1'b0;
      end
      // read side
      if (rd_fire) begin
        rd_ptr <= rd_nxt;
        if (rd_done) begin
          rd_cnt <= '0;
          lq_rd  <= lq_rd + (LW+1)'(1);
        end else begin
          rd_cnt <= rd_cnt + 16'd1;
        end
      end
    end
  end
endmodule
