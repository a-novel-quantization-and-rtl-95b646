// axil_regs: AXI4-Lite slave holding the accelerator's configuration.
//
// The host processor configures a pass through this port: layer geometry,
// output mode and scale shift, the S-Huff table and word count, the eight
// activation levels and the 36 P-LUT entries. Writing CTRL with bit 0 set
// starts a pass (start pulses for one cycle, ignored while busy; bit 3 is
// latched with it and asks for the next decoded weight tile); bit 2 asks
// for a weight tile to be decoded from the weight stream (load pulses,
// also while a pass runs). STATUS shows busy, a sticky done bit that the
// next start clears, a decode in progress or requested, and a decoded
// tile waiting for its pass. The register map is in
// plut_pkg (REG_*). P-LUT writes are forwarded to plut_table, whose
// contents are read back through lut_q.
//
// Interface: a 12-bit-address, 32-bit-data AXI4-Lite slave (no WSTRB: every
// write is a full word), the decoded configuration outputs, and busy /
// loading / pending / done_pulse / out_count from the controller.
// Timing: a write is accepted when address and data are both valid (one
// cycle, then BVALID until BREADY); a read returns the next cycle with
// RVALID until RREADY. Responses are always OKAY.
//
// An AXI control interface follows the accelerator description; the
// register map and the Lite subset are this design's choices.
module axil_regs
  import plut_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite
  input  logic [11:0]       awaddr,
  input  logic              awvalid,
  output logic              awready,
  input  logic [31:0]       wdata,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  input  logic [11:0]       araddr,
  input  logic              arvalid,
  output logic              arready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  output logic              rvalid,
  input  logic              rready,
  // configuration
  output logic              start,
  output logic              new_tile,
  output logic              load,
  output logic              raw,
  output logic [15:0]       width,
  output logic [15:0]       height,
  output logic              stride2,
  output logic signed [5:0] shift,
  output logic [15:0]       wwords,
  output logic [2:0]        hcount [1:HLMAX],
  output logic [IDX_W-1:0]  hsym   [HLMAX],
  output lut_entry_t        levels [NLEV],
  output logic              lut_we,
  output logic [5:0]        lut_waddr,
  output lut_entry_t        lut_wdata,
  input  lut_entry_t        lut_q  [LUT_N],
  // status
  input  logic              busy,
  input  logic              loading,
  input  logic              pending,
  input  logic              done_pulse,
  input  logic [31:0]       out_count
);

  logic        wr;
  logic        done_q;
  logic [20:0] hcount_q;
  logic [20:0] hsym_q;

  assign wr      = awvalid && wvalid && !bvalid;
  assign awready = wr;
  assign wready  = wr;
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;
  assign arready = !rvalid;

  assign lut_we    = wr && (awaddr >= REG_LUT0) && (awaddr < REG_LUT0 + 12'(4 * LUT_N));
  assign lut_waddr = 6'((awaddr - REG_LUT0) >> 2);
  assign lut_wdata = wdata;

  always_comb begin
    for (int l = 1; l <= int'(HLMAX); l++) hcount[l] = hcount_q[(l-1)*3 +: 3];
    for (int s = 0; s < int'(HLMAX); s++)  hsym[s]   = hsym_q[s*3 +: 3];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start    <= 1'b0;
      new_tile <= 1'b0;
      load     <= 1'b0;
      raw      <= 1'b0;
      width    <= 16'd3;
      height   <= 16'd3;
      stride2  <= 1'b0;
      shift    <= '0;
      wwords   <= '0;
      hcount_q <= '0;
      hsym_q   <= '0;
      levels   <= '{default: '0};
      done_q   <= 1'b0;
      bvalid   <= 1'b0;
    end else begin
      start <= 1'b0;
      load  <= 1'b0;
      if (done_pulse) done_q <= 1'b1;
      if (bvalid && bready) bvalid <= 1'b0;
      if (wr) begin
        bvalid <= 1'b1;
        unique case (awaddr)
          REG_CTRL: begin
            raw  <= wdata[1];
            load <= wdata[2];
            if (wdata[0] && !busy) begin
              start    <= 1'b1;
              new_tile <= wdata[3];
              done_q   <= 1'b0;
            end
          end
          REG_WIDTH:  width    <= wdata[15:0];
          REG_HEIGHT: height   <= wdata[15:0];
          REG_STRIDE: stride2  <= (wdata[1:0] == 2'd2);
          REG_SHIFT:  shift    <= wdata[5:0];
          REG_WWORDS: wwords   <= wdata[15:0];
          REG_HCOUNT: hcount_q <= wdata[20:0];
          REG_HSYM:   hsym_q   <= wdata[20:0];
          default: begin
            if (awaddr >= REG_LEVEL0 && awaddr < REG_LEVEL0 + 12'(4 * NLEV))
              levels[3'((awaddr - REG_LEVEL0) >> 2)] <= wdata;
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      if (rvalid && rready) rvalid <= 1'b0;
      if (arvalid && arready) begin
        rvalid <= 1'b1;
        unique case (araddr)
          REG_CTRL:   rdata <= {28'd0, new_tile, 1'b0, raw, 1'b0};
          REG_STATUS: rdata <= {28'd0, pending, loading, done_q, busy};
          REG_WIDTH:  rdata <= {16'd0, width};
          REG_HEIGHT: rdata <= {16'd0, height};
          REG_STRIDE: rdata <= stride2 ? 32'd2 : 32'd1;
          REG_SHIFT:  rdata <= 32'(shift);
          REG_WWORDS: rdata <= {16'd0, wwords};
          REG_HCOUNT: rdata <= {11'd0, hcount_q};
          REG_HSYM:   rdata <= {11'd0, hsym_q};
          REG_OUTCNT: rdata <= out_count;
          default: begin
            if (araddr >= REG_LEVEL0 && araddr < REG_LEVEL0 + 12'(4 * NLEV))
              rdata <= levels[3'((araddr - REG_LEVEL0) >> 2)];
            else if (araddr >= REG_LUT0 && araddr < REG_LUT0 + 12'(4 * LUT_N))
              rdata <= lut_q[6'((araddr - REG_LUT0) >> 2)];
            else
              rdata <= '0;
          end
        endcase
      end
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid && !bready |=> bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid && !rready |=> rvalid && $stable(rdata));

endmodule
