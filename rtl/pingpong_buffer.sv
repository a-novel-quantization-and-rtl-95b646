// pingpong_buffer: two-bank double buffer on a valid/ready word stream.
//
// The writer fills one bank while the reader empties the other. A bank is
// handed to the reader when it is full or when the word marked s_last has
// been written (a partial bank); the reader then sees the bank's words in
// order, with m_last on the last word of a bank closed by s_last. This
// hides the latency of the external transfers: a whole bank can be fetched
// while the previous one is consumed.
//
// Interface: s_* in, m_* out (AXI-stream style data/valid/ready/last);
// swap pulses whenever the writer closes a bank.
// Timing: a word is visible at the output only after its bank has been
// closed, i.e. at least one cycle after it was written; one word per cycle
// in and out. Reset empties both banks.
//
// A double buffer for input and output follows the accelerator
// description; the bank depth and hand-over rule are this design's choices.
module pingpong_buffer #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] s_data,
  input  logic          s_valid,
  input  logic          s_last,
  output logic          s_ready,
  output logic [DW-1:0] m_data,
  output logic          m_valid,
  output logic          m_last,
  input  logic          m_ready,
  output logic          swap
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [2][DEPTH];
  logic          full [2];
  logic          last [2];
  logic [AW:0]   cnt  [2];
  logic          wbank, rbank;
  logic [AW:0]   wptr, rptr;
  logic          wr, rd, rd_end;

  assign s_ready = !full[wbank];
  assign wr      = s_valid && s_ready;
  assign m_valid = full[rbank];
  assign m_data  = mem[rbank][rptr[AW-1:0]];
  assign rd_end  = (rptr == cnt[rbank] - 1'b1);
  assign m_last  = last[rbank] && rd_end;
  assign rd      = m_valid && m_ready;

  always_ff @(posedge clk) begin
    if (wr) mem[wbank][wptr[AW-1:0]] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '{default: 1'b0};
      last  <= '{default: 1'b0};
      cnt   <= '{default: '0};
      wbank <= 1'b0;
      rbank <= 1'b0;
      wptr  <= '0;
      rptr  <= '0;
      swap  <= 1'b0;
    end else begin
      swap <= 1'b0;
      if (wr) begin
        if (wptr == (AW+1)'(DEPTH - 1) || s_last) begin
          full[wbank] <= 1'b1;
          last[wbank] <= s_last;
          cnt[wbank]  <= wptr + 1'b1;
          wbank       <= ~wbank;
          wptr        <= '0;
          swap        <= 1'b1;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
      if (rd) begin
        if (rd_end) begin
          full[rbank] <= 1'b0;
          rbank       <= ~rbank;
          rptr        <= '0;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    wr |-> !full[wbank]);
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data));

endmodule
