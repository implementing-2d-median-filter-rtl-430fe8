// line_buffer: stores the last W_V-1 video lines and builds pixel columns.
//
// For every accepted input pixel at column x the buffer delivers the full
// column of W_V pixels at x: the W_V-1 pixels held from the previous lines
// plus the new one. The memory is one array of LINE_WIDTH words, each word
// holding W_V-1 pixels (one per stored line, newest line in the low slot);
// on-chip this maps onto block RAM. Each access is a read followed by a
// write to the same address: the word is shifted by one pixel, the oldest
// line's pixel drops out and the new pixel enters.
//
// A column counter tracks x; it returns to 0 after a pixel flagged line_end
// or frame_end (so the line length is set by the flags, up to LINE_WIDTH).
//
// Interface: valid/ready on both sides. col[0] is the top (oldest line)
// pixel and col[W_V-1] the new pixel; col_ctrl are the input pixel's flags.
// Timing: a pixel accepted at edge t gives col_valid from edge t+1 until it
// is taken (col_valid && col_ready). The memory write happens in the first
// cycle of col_valid. A new pixel can be accepted in the same cycle that the
// column is taken, so the buffer sustains one pixel per clock if the
// consumer does. Memory contents start at zero (block RAM initial value).
//
// Origin: a buffer of W_V-1 lines in block RAM is the published design; the
// single wide memory, the column counter and the handshake are choices of
// this implementation.
module line_buffer
  import median_pkg::*;
#(
  parameter int unsigned LINE_WIDTH = 720,
  parameter int unsigned W_V        = 11,
  parameter int unsigned XW         = $clog2(LINE_WIDTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  rgb_t                 in_rgb,
  input  ctrl_t                in_ctrl,
  output logic                 col_valid,
  input  logic                 col_ready,
  output rgb_t [W_V-1:0]       col,
  output ctrl_t                col_ctrl
);

  localparam int unsigned LINES = W_V - 1;
  typedef rgb_t [LINES-1:0] word_t;   // [0] = newest stored line

  word_t          mem [LINE_WIDTH];
  word_t          rd_q;
  rgb_t           pix_q;
  ctrl_t          ctrl_q;
  logic [XW-1:0]  x, addr_q;
  logic           wr_pend;

  initial for (int i = 0; i < LINE_WIDTH; i++) mem[i] = '0;

  word_t shifted;                     // word with the new pixel pushed in
  always_comb begin
    shifted[0] = pix_q;
    for (int l = 1; l < LINES; l++) shifted[l] = rd_q[l-1];
  end

  logic accept;
  assign in_ready = !col_valid || col_ready;
  assign accept   = in_valid && in_ready;

  // Read on accept, write back the shifted word one cycle later.
  always_ff @(posedge clk) begin
    if (accept) rd_q <= mem[x];
    if (wr_pend) mem[addr_q] <= shifted[LINES-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      addr_q    <= '0;
      pix_q     <= '0;
      ctrl_q    <= '0;
      col_valid <= 1'b0;
      wr_pend   <= 1'b0;
    end else begin
      wr_pend <= accept;
      if (accept) begin
        addr_q    <= x;
        pix_q     <= in_rgb;
        ctrl_q    <= in_ctrl;
        col_valid <= 1'b1;
        if (in_ctrl.line_end || in_ctrl.frame_end || 32'(x) == LINE_WIDTH - 1)
          x <= '0;
        else
          x <= x + 1'b1;
      end else if (col_ready) begin
        col_valid <= 1'b0;
      end
    end
  end

  // Column: oldest stored line on top, the new pixel at the bottom.
  always_comb begin
    for (int r = 0; r < LINES; r++) col[r] = rd_q[LINES-1-r];
    col[W_V-1] = pix_q;
  end
  assign col_ctrl = ctrl_q;

endmodule
