// accel_ctrl: sequencer of the accelerator's passes and weight loads.
//
// A pass convolves one image of eight input channels with the weight tile
// (8x8x3x3) in the active bank of the weight buffer. Weight tiles are
// decoded independently of passes, from their own stream, into the shadow
// bank, so the next tile can be decoded while the current pass computes.
//
// Weight loading: a load request (pulse) is remembered until the decoder is
// free and no decoded tile is waiting; then dec_start starts the decoder.
// When the decoder is done the tile is pending: it waits in the shadow bank
// until a pass asks for it.
//
// A pass: on start the controller works out the number of output pixels,
// ((H-3)/S + 1) * ((W-3)/S + 1) for stride S, then
//   LOAD : only if new_tile is set: waits until the requested or running
//          decode is finished, then swaps the banks (if no tile is pending,
//          requested or being decoded, the current tile is kept);
//   RUN  : routes the input stream to the line buffer until W*H pixels
//          have been taken and all output pixels have been handed to the
//          output stage, flagging the last one;
//   DONE : waits until the last output word has entered the output buffer
//          (with stride 2 that can happen before the last image row has
//          been read, so both conditions are needed), then pulses done.
// Without new_tile the pass reuses the active tile and goes straight to
// RUN, while a background decode may continue into the shadow bank.
//
// Interface: start/new_tile/load and the geometry from the registers;
// dec_start/dec_done to the decoder; swap to the weight buffer; to_lb lets
// the input stream into the line buffer; pix_take and res_take count
// pixels into the line buffer and results into the output stage; res_last
// marks the final output pixel; out_last_sent is the output stage's final
// word handshake; loading (decode requested or running) and pending
// (decoded tile waiting) are status bits.
// Timing: one state change per cycle; busy is high from start to done.
//
// Decoding weights into the second bank of a double buffer so that the
// decode time is hidden behind computation follows the accelerator
// description; the states, the request rule and the counters are this
// design's choices.
module accel_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        new_tile,
  input  logic        load,
  input  logic [15:0] width,
  input  logic [15:0] height,
  input  logic        stride2,
  output logic        dec_start,
  input  logic        dec_done,
  output logic        swap,
  output logic        lb_clear,
  output logic        to_lb,
  input  logic        pix_take,
  input  logic        res_take,
  output logic        res_last,
  input  logic        out_last_sent,
  output logic        busy,
  output logic        loading,
  output logic        pending,
  output logic        done,
  output logic [31:0] out_count
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_DONE} state_e;

  state_e      state_q;
  logic [31:0] pix_left_q;
  logic [31:0] res_total_q;
  logic [31:0] res_cnt_q;
  logic        last_seen_q;
  logic        load_req_q, dec_run_q, pending_q, load_go;
  logic [15:0] ow, oh;

  always_comb begin
    ow = stride2 ? ((width  - 16'd3) >> 1) + 16'd1 : width  - 16'd2;
    oh = stride2 ? ((height - 16'd3) >> 1) + 16'd1 : height - 16'd2;
  end

  assign busy     = (state_q != S_IDLE);
  assign loading  = load_req_q || dec_run_q;
  assign pending  = pending_q;
  // a requested load starts as soon as the decoder and the shadow bank are free
  assign load_go  = (load || load_req_q) && !dec_run_q && !pending_q;
  assign to_lb    = (state_q == S_RUN) && (pix_left_q != 0);
  assign res_last = (res_cnt_q == res_total_q - 32'd1);
  assign out_count = res_cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      pix_left_q  <= '0;
      res_total_q <= '0;
      res_cnt_q   <= '0;
      last_seen_q <= 1'b0;
      load_req_q  <= 1'b0;
      dec_run_q   <= 1'b0;
      pending_q   <= 1'b0;
      dec_start   <= 1'b0;
      swap        <= 1'b0;
      lb_clear    <= 1'b0;
      done        <= 1'b0;
    end else begin
      dec_start <= 1'b0;
      swap      <= 1'b0;
      lb_clear  <= 1'b0;
      done      <= 1'b0;
      if (out_last_sent) last_seen_q <= 1'b1;
      // weight loading, independent of the pass
      if (load_go) begin
        dec_start  <= 1'b1;
        dec_run_q  <= 1'b1;
        load_req_q <= 1'b0;
      end else if (load) begin
        load_req_q <= 1'b1;
      end
      if (dec_done) begin
        dec_run_q <= 1'b0;
        pending_q <= 1'b1;
      end
      if (res_take) res_cnt_q <= res_cnt_q + 32'd1;
      if (pix_take && pix_left_q != 0) pix_left_q <= pix_left_q - 32'd1;
      unique case (state_q)
        S_IDLE: if (start) begin
          pix_left_q  <= 32'(width) * 32'(height);
          res_total_q <= 32'(ow) * 32'(oh);
          res_cnt_q   <= '0;
          last_seen_q <= 1'b0;
          lb_clear    <= 1'b1;
          state_q     <= new_tile ? S_LOAD : S_RUN;
        end
        S_LOAD: begin
          if (pending_q) begin
            swap      <= 1'b1;
            pending_q <= 1'b0;
            state_q   <= S_RUN;
          end else if (!dec_run_q && !load_req_q && !load) begin
            state_q   <= S_RUN;
          end
        end
        S_RUN: if (pix_left_q == 0 && res_cnt_q == res_total_q) state_q <= S_DONE;
        S_DONE: if (last_seen_q || out_last_sent) begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
