// column_serializer: turns a pixel column into W_V consecutive samples.
//
// The sorting array takes one new sample per clock, so the W_V pixels of a
// column enter it in W_V successive cycles, top (oldest line) first; the
// filter clock is W_V times the pixel rate. The last sample of a column is
// flagged col_last and carries the pixel's line_end/frame_end flags.
//
// Interface: col_valid/col_ready handshake in; the output is a valid-only
// stream (the filter core accepts a sample every clock). col_ready is high
// when no sample is left to send or the last one is sent in this cycle, so
// columns follow each other without a gap: W_V samples per W_V clocks.
// Timing: a column taken at edge t gives its first sample from edge t on
// (registered output), its last W_V-1 cycles later.
//
// Origin: the published architecture enters one sample per clock and W_V
// samples per pixel but does not describe the sequencing; this module is
// this implementation's own.
module column_serializer
  import median_pkg::*;
#(
  parameter int unsigned W_V = 11,
  parameter int unsigned CW  = $clog2(W_V + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            col_valid,
  output logic            col_ready,
  input  rgb_t [W_V-1:0]  col,
  input  ctrl_t           col_ctrl,
  output logic            out_valid,
  output sample_t         out_sample
);

  rgb_t [W_V-1:0] sh;          // sh[0] is the next sample to send
  ctrl_t          ctrl_q;
  logic [CW-1:0]  left;        // samples still to send, including sh[0]

  assign col_ready  = (left <= 1);
  assign out_valid  = (left != 0);
  assign out_sample = '{rgb: sh[0], col_last: (left == 1),
                        ctrl: (left == 1) ? ctrl_q : '0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh     <= '0;
      ctrl_q <= '0;
      left   <= '0;
    end else if (col_valid && col_ready) begin
      sh     <= col;
      ctrl_q <= col_ctrl;
      left   <= CW'(W_V);
    end else if (left != 0) begin
      sh   <= sh >> $bits(rgb_t);
      left <= left - 1'b1;
    end
  end

endmodule
