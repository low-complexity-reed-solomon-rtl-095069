// tb_t_decoder: exhaustive check of the t-decoder.
//
// For every t = 0..TM the enable lines must be t_en = 2^t - 1 (lines
// 1..t on, the thermometer code that switches on cell pairs 2k-2, 2k-1 for
// k <= t). The block is combinational; a timeout stops a hung run.
module tb_t_decoder;
  localparam int TM = 8;
  logic [3:0]    t;
  logic [TM-1:0] t_en;
  int checks = 0, failures = 0;

  t_decoder dut (.t(t), .t_en(t_en));

  initial begin
    for (int v = 0; v <= TM; v++) begin
      logic [TM-1:0] exp_en;
      t = 4'(v);
      #1;
      exp_en = '0;
      for (int k = 0; k < v; k++) exp_en[k] = 1'b1;
      checks++;
      if (t_en !== exp_en) begin
        failures++;
        $display("ERROR: t=%0d t_en=%b exp %b", v, t_en, exp_en);
      end
      // number of enabled syndrome cells is 2t
      checks++;
      if (2 * $countones(t_en) != 2 * v) begin
        failures++;
        $display("ERROR: t=%0d enables %0d cells", v, 2 * $countones(t_en));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
