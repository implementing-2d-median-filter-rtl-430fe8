// delay_line: addressable FIFO holding the RGB values of recent samples.
//
// A shift register of DEPTH entries: on push the new value enters entry 0
// and every entry moves one place down. The read port is combinational and
// returns entry addr, i.e. the value pushed addr pushes ago. This is the
// structure of an FPGA addressable shift register (e.g. SRL16 chains), which
// the design uses so the sorting cells need to carry only the 10-bit filter
// value, not the 24-bit colour: the median cell's age selects the colour.
// Entries start at zero (power-up value of such shift registers); there is
// deliberately no reset on the data, as in those primitives.
//
// Origin: the published design builds this from SRL16 primitives; this is
// generic RTL of the same structure. The depth N+1 is this
// implementation's choice (window plus one key-generator stage).
module delay_line #(
  parameter int unsigned DEPTH = 122,
  parameter int unsigned W     = 24,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          push,
  input  logic [W-1:0]  din,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  dout
);

  logic [W-1:0] sr [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) sr[i] = '0;

  always_ff @(posedge clk) begin
    if (push) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  assign dout = (32'(addr) < DEPTH) ? sr[addr] : '0;

endmodule
