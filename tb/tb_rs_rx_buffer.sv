// tb_rs_rx_buffer: check of the receive buffer (circular FIFO).
//
// Random writes and reads (never reading empty or writing full) are
// compared with a queue model: rd_data must show the oldest symbol, and
// count_o the fill level. The buffer is also filled to DEPTH once and
// emptied, so the pointers wrap.
module tb_rs_rx_buffer;
  import rs_pkg::*;

  localparam int DEPTH = 1024;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  gf_t  wr_data = '0, rd_data;
  logic [10:0] count_o;
  gf_t  model [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rs_rx_buffer dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_data(wr_data),
    .rd_en(rd_en), .rd_data(rd_data), .count_o(count_o)
  );

  task automatic cycle(bit w, bit r);
    wr_en   = w && (model.size() < DEPTH);
    rd_en   = r && (model.size() > 0);
    wr_data = 8'($urandom);
    #1;
    checks++;
    if (32'(count_o) != model.size()) begin
      failures++;
      $display("ERROR: count %0d exp %0d", count_o, model.size());
    end
    if (model.size() > 0) begin
      checks++;
      if (rd_data !== model[0]) begin
        failures++;
        $display("ERROR: rd_data %02h exp %02h", rd_data, model[0]);
      end
    end
    if (rd_en) model.delete(0);
    if (wr_en) model.push_back(wr_data);
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) cycle($urandom_range(0, 2) != 0, 1'($urandom_range(0, 1)));
    for (int c = 0; c < DEPTH + 10; c++) cycle(1, 0);
    checks++;
    if (32'(count_o) != DEPTH) begin failures++; $display("ERROR: not full"); end
    for (int c = 0; c < DEPTH + 10; c++) cycle(0, 1);
    for (int c = 0; c < 3000; c++) cycle(1'($urandom_range(0, 1)), $urandom_range(0, 2) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
