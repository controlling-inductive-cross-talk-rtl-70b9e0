// tb_xtalk_link_full: the link at its default configuration (one segment of
// the example bus, n = 7, p = 2, aggressive coding, 3-bit words) carrying
// a random stream of 5000 words, wires connected straight through. Every
// transmitted transition must meet the constraints of the reference model,
// every word must come out two cycles after it went in, code_err and the
// rule monitor must stay quiet.
module tb_xtalk_link_full;
  import tb_xtalk_ref_pkg::*;

  localparam int WORDS = 5000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0]  tx_data [1];
  logic [4:0]  tx_sig  [1];
  logic [2:0]  rx_data [1];
  logic [0:0]  rx_code_err;
  logic [17:0] rx_viol [1];

  xtalk_link dut (
    .clk, .rst_n, .tx_data, .tx_sig, .rx_sig(tx_sig), .rx_data, .rx_code_err, .rx_viol
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (WORDS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] sent [$];
    logic [4:0] prev;
    tx_data[0] = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    prev = tx_sig[0];
    check(prev == 5'b00001, "reset state");
    for (int c = 0; c < WORDS + 2; c++) begin
      tx_data[0] = 3'($urandom);
      sent.push_back(tx_data[0]);
      @(posedge clk);
      #1;
      check(ref_viol(5, 50, 5, prev, tx_sig[0]) == 0,
            $sformatf("illegal transition %b->%b", prev, tx_sig[0]));
      prev = tx_sig[0];
      check(rx_viol[0] == '0 && !rx_code_err[0], "monitor or code error on a clean link");
      if (c >= 1) begin
        check(rx_data[0] == sent[0], $sformatf("word %0d: got %0d expected %0d", c - 1, rx_data[0], sent[0]));
        void'(sent.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
