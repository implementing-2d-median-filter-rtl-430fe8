// filter_core: sorting cells, empty generation and RGB delay line.
//
// The cell array sorts the filter values (keys) of the last N = W_H*W_V
// samples and reports the age of the median one. The colours of the same
// samples sit in the delay line, an addressable FIFO, so the median's colour
// is read at the median's age. The delay line is written from the colour
// stream, which runs FV_LAT clocks ahead of the key stream; the core counts
// the samples already in the delay line but not yet in the cells
// (in_flight) and reads at med_age + in_flight. This is the latency
// compensation of the age, and stays exact even if the sample stream has
// gaps.
//
// After a sample flagged col_last has been sorted in, the window of the
// pixel that closed it is complete: one clock later the core presents its
// median colour and key on out_* with out_valid, together with the pixel's
// line_end/frame_end flags (the delayed control signals). Latency: output 2
// clocks after the col_last key enters (1 to sort, 1 output register).
//
// Origin: cells, empty generation and an age-addressed delay line with
// latency compensation are the published design; counting the samples in
// flight and the output register are this implementation's choices.
module filter_core
  import median_pkg::*;
#(
  parameter int unsigned W_H    = 11,
  parameter int unsigned W_V    = 11,
  parameter int unsigned FV_LAT = 1     // key stream lag behind colour stream
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rgb_valid,
  input  rgb_t       rgb,
  input  logic       fv_valid,
  input  fv_sample_t fv_sample,
  output logic       out_valid,
  output rgb_t       out_rgb,
  output fv_t        out_fv,
  output ctrl_t      out_ctrl
);

  localparam int unsigned N     = W_H * W_V;
  localparam int unsigned AW    = $clog2(N);
  localparam int unsigned DEPTH = N + FV_LAT;
  localparam int unsigned DAW   = $clog2(DEPTH);
  localparam int unsigned IW    = $clog2(FV_LAT + 2);

  logic [AW-1:0]         med_age;
  fv_t                   med_data;

  cell_array #(.N(N), .DW(FV_W), .AW(AW)) u_cells (
    .clk, .rst_n,
    .en        (fv_valid),
    .new_sample(fv_sample.fv),
    .med_age, .med_data,
    .cell_data(), .cell_age(), .cell_empty(), .cell_sel()
  );

  // Samples written to the delay line whose keys are not yet in the cells.
  logic [IW-1:0] in_flight;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      in_flight <= '0;
    else if (rgb_valid && !fv_valid) in_flight <= in_flight + 1'b1;
    else if (!rgb_valid && fv_valid) in_flight <= in_flight - 1'b1;
  end

  logic [DAW-1:0] rd_addr;
  rgb_t           dl_out;
  assign rd_addr = DAW'(med_age) + DAW'(in_flight);

  delay_line #(.DEPTH(DEPTH), .W($bits(rgb_t)), .AW(DAW)) u_delay_line (
    .clk,
    .push(rgb_valid),
    .din (rgb),
    .addr(rd_addr),
    .dout(dl_out)
  );

  // The window closed by a col_last sample is complete after it is sorted in.
  logic  done_q;
  ctrl_t ctrl_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q    <= 1'b0;
      ctrl_q    <= '0;
      out_valid <= 1'b0;
      out_rgb   <= '0;
      out_fv    <= '0;
      out_ctrl  <= '0;
    end else begin
      done_q    <= fv_valid && fv_sample.col_last;
      ctrl_q    <= fv_sample.ctrl;
      out_valid <= done_q;
      if (done_q) begin
        out_rgb  <= dl_out;
        out_fv   <= med_data;
        out_ctrl <= ctrl_q;
      end
    end
  end

  // The key stream can lag the colour stream by at most FV_LAT samples.
  a_in_flight: assert property (@(posedge clk) disable iff (!rst_n) 32'(in_flight) <= FV_LAT)
    else $error("filter_core: key stream lags colour stream by %0d", in_flight);

endmodule
