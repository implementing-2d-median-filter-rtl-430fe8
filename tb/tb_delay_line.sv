// tb_delay_line: pushes random words at random times and reads random
// addresses; entry a must be the word pushed a pushes ago (zero before the
// line has filled).
module tb_delay_line;

  localparam int unsigned DEPTH = 10;
  localparam int unsigned W     = 8;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  always #50 clk = ~clk;   // long period: all addresses are read between edges

  logic          push = 1'b0;
  logic [W-1:0]  din = '0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0]  dout;

  delay_line #(.DEPTH(DEPTH), .W(W), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  initial begin
    for (int i = 0; i < DEPTH; i++) model.push_back('0);
    for (int t = 0; t < 2000; t++) begin
      logic p;
      logic [W-1:0] d;
      p = ($urandom % 3) != 0;
      d = W'($urandom);
      push <= p;
      din  <= d;
      addr <= AW'($urandom % DEPTH);
      @(posedge clk);
      if (p) begin
        model.push_front(d);
        void'(model.pop_back());
      end
      #1;
      for (int a = 0; a < DEPTH; a++) begin
        addr = AW'(a);
        #1;
        checks++;
        if (dout !== model[a]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d addr %0d: %h, expected %h", t, a, dout, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
