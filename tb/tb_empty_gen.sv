// tb_empty_gen: checks the empty_left / empty_right OR chains against a
// direct loop over all cells, for random and one-hot empty vectors.
module tb_empty_gen;

  localparam int unsigned N = 9;

  logic [N-1:0] empty, empty_left, empty_right;
  empty_gen #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 600; t++) begin
      if (t < N) empty = N'(1) << t;
      else       empty = N'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        logic l, r;
        l = 1'b0;
        r = 1'b0;
        for (int j = 0; j < i; j++)     l |= empty[j];
        for (int j = i + 1; j < N; j++) r |= empty[j];
        checks++;
        if (empty_left[i] !== l || empty_right[i] !== r) begin
          failures++;
          if (failures < 10)
            $display("FAIL empty=%b cell %0d: left %b right %b, expected %b %b",
                     empty, i, empty_left[i], empty_right[i], l, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
