// dct_ctrl -- controller of the 2-D DCT chip: ping-pong bank management and
// sequencing of the transpose buffers and the core.
//
// Input side: every accepted sample (in_valid) is written to the current
// input bank at the next raster address. When 64 samples are in, the banks
// swap and the full bank is handed to the core.
// Core side: for a full input bank the controller reads its SER_W bit planes
// (planes 0..IN_W-1, then the sign plane again) on consecutive cycles and
// frames them for the core with valid/first/last, one cycle after each read
// (the buffer's read latency).
// Output side: when the core signals y_valid, the 16 coefficient bit planes
// are written, one per cycle, into the current output bank, which is then
// marked full and the output banks swap. The reader empties a full output
// bank one 16-bit coefficient per cycle (raster order of k1, k2); out_valid
// marks each word, one cycle after its read.
//
// A block occupies the input for at least 64 cycles, the core for 13 cycles
// and the output writer for 16, so at up to one sample per cycle no bank is
// ever needed by two sides at once. 'overrun' is set (sticky) if that is
// violated: a block completes while the core is still busy, or the writer
// needs an output bank that has not yet been read out.
// The source design names a controller but not its behaviour; this schedule
// is this design's own.
module dct_ctrl
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  // input buffers
  output logic       in_we,
  output logic       in_wbank,
  output logic [5:0] in_waddr,
  output logic       in_re,
  output logic       in_rbank,
  output logic [3:0] in_rcol,
  // core
  output logic       core_valid,
  output logic       core_first,
  output logic       core_last,
  input  logic       core_y_valid,
  output logic [3:0] plane_sel,
  // output buffers
  output logic       out_we,
  output logic       out_wbank,
  output logic [3:0] out_wrow,
  output logic       out_re,
  output logic       out_rbank,
  output logic [5:0] out_raddr,
  output logic       out_valid,
  // status
  output logic       blk_start,
  output logic       overrun
);
  // ---------------- input writer ----------------
  logic blk_full;
  assign in_we    = in_valid;
  assign blk_full = in_valid && (in_waddr == 6'd63);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_waddr <= '0;
      in_wbank <= 1'b0;
    end else if (in_valid) begin
      in_waddr <= in_waddr + 6'd1;
      if (blk_full) in_wbank <= ~in_wbank;
    end
  end

  // ---------------- plane reader / core framing ----------------
  logic       rd_busy;
  logic [3:0] rd_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy   <= 1'b0;
      rd_cnt    <= '0;
      in_rbank  <= 1'b0;
      blk_start <= 1'b0;
    end else begin
      blk_start <= blk_full;
      if (blk_full) begin
        rd_busy  <= 1'b1;
        rd_cnt   <= '0;
        in_rbank <= in_wbank;
      end else if (rd_busy) begin
        if (rd_cnt == 4'(SER_W - 1)) rd_busy <= 1'b0;
        rd_cnt <= rd_cnt + 4'd1;
      end
    end
  end

  assign in_re   = rd_busy;
  assign in_rcol = (rd_cnt > 4'(IN_W - 1)) ? 4'(IN_W - 1) : rd_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      core_valid <= 1'b0;
      core_first <= 1'b0;
      core_last  <= 1'b0;
    end else begin
      core_valid <= rd_busy;
      core_first <= rd_busy && rd_cnt == 4'd0;
      core_last  <= rd_busy && rd_cnt == 4'(SER_W - 1);
    end
  end

  // ---------------- output writer ----------------
  logic       wr_busy;
  logic [1:0] out_full;
  logic       wr_done, rd_done;

  assign out_we    = wr_busy;
  assign plane_sel = out_wrow;
  assign wr_done   = wr_busy && out_wrow == 4'(OUT_W - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy   <= 1'b0;
      out_wrow  <= '0;
      out_wbank <= 1'b0;
    end else begin
      if (core_y_valid) begin
        wr_busy  <= 1'b1;
        out_wrow <= '0;
      end else if (wr_busy) begin
        out_wrow <= out_wrow + 4'd1;
        if (wr_done) begin
          wr_busy   <= 1'b0;
          out_wbank <= ~out_wbank;
        end
      end
    end
  end

  // ---------------- output reader ----------------
  assign out_re  = out_full[out_rbank];
  assign rd_done = out_re && out_raddr == 6'd63;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_full  <= '0;
      out_rbank <= 1'b0;
      out_raddr <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= out_re;
      if (out_re) begin
        out_raddr <= out_raddr + 6'd1;
        if (rd_done) out_rbank <= ~out_rbank;
      end
      for (int b = 0; b < 2; b++) begin
        if (wr_done && out_wbank == 1'(b))      out_full[b] <= 1'b1;
        else if (rd_done && out_rbank == 1'(b)) out_full[b] <= 1'b0;
      end
    end
  end

  // ---------------- overrun detection ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overrun <= 1'b0;
    else if ((blk_full && rd_busy) ||
             (core_y_valid && wr_busy) ||
             (core_y_valid && out_full[out_wbank]))
      overrun <= 1'b1;
  end
endmodule
