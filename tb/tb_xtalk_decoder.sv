// tb_xtalk_decoder: checks the decoder on the example bus (n = 7, p = 2)
// in both coding styles. The testbench plays the transmitter itself, with
// its own codebook (word d from state s = d-th legal successor of s in the
// code set, counted upwards), and checks that
//  - each word comes out of data_out one cycle after its pin state;
//  - code_err stays low on codeword transitions;
//  - a pin state that is not a codeword successor (about one cycle in
//    eight is replaced by a random state) raises code_err, and decoding
//    resumes from that state on the next cycle (every transition out of a
//    state outside the code set is an error);
//  - reset returns the decoder to the encoder's reset state.
module tb_xtalk_decoder;
  import xtalk_pkg::*;
  import tb_xtalk_ref_pkg::*;

  localparam xtalk_cfg_t CN = make_cfg(7, 2, STYLE_NON_AGGRESSIVE, 100);
  localparam int         CYCLES = 20000;

  int checks = 0, failures = 0;
  int n_err_seen = 0, n_words = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] a_sig, n_sig_d;
  logic [2:0] a_out;
  logic [3:0] n_out;
  logic       a_err, n_err;

  xtalk_decoder             u_a (.clk, .rst_n, .sig_in(a_sig), .data_out(a_out), .code_err(a_err));
  xtalk_decoder #(.CFG(CN)) u_n (.clk, .rst_n, .sig_in(n_sig_d), .data_out(n_out), .code_err(n_err));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int ref_next(int thr, int s, int d);
    int n = 0;
    for (int t = 0; t < 32; t++) begin
      if (thr == 50 && (t == 0 || t == 31)) continue;
      if (ref_viol(5, thr, 5, s, t) == 0) begin
        if (n == d) return t;
        n++;
      end
    end
    return -1;
  endfunction

  // Word carried by s -> t, or -1 when t is no codeword successor of s or
  // s lies outside the code set (the transmitter never leaves it).
  function automatic int ref_word(int thr, int nw, int s, int t);
    int w = -1;
    if (!(thr == 50 && (s == 0 || s == 31)))
      for (int d = nw - 1; d >= 0; d--) if (ref_next(thr, s, d) == t) w = d;
    return w;
  endfunction

  initial begin : watchdog
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pa, pn, ta, tn, wa, wn;
    a_sig = 5'b00001; n_sig_d = 5'b00000;
    repeat (2) @(posedge clk);
    #1;
    check(a_err == 0 && n_err == 0 && a_out == 0 && n_out == 0, "outputs after reset");
    rst_n = 1'b1;
    pa = 1; pn = 0;
    for (int c = 0; c < CYCLES; c++) begin
      if (c == CYCLES / 2) begin
        // Reset in the middle: both ends go back to the reset state.
        rst_n = 1'b0;
        @(posedge clk);
        #1;
        rst_n = 1'b1;
        pa = 1; pn = 0;
      end
      if ($urandom_range(7, 0) == 0) ta = (pa == 1) ? 31 : int'($urandom_range(31, 0));
      else ta = ref_next(50, pa, $urandom_range(7, 0));
      if ($urandom_range(7, 0) == 0) tn = int'($urandom_range(31, 0));
      else tn = ref_next(125, pn, $urandom_range(15, 0));
      // From a state outside the code set there may be no codeword: go on
      // with a random state.
      if (ta < 0) ta = int'($urandom_range(31, 0));
      if (tn < 0) tn = int'($urandom_range(31, 0));
      wa = ref_word(50, 8, pa, ta);
      wn = ref_word(125, 16, pn, tn);
      a_sig = 5'(ta); n_sig_d = 5'(tn);
      @(posedge clk);
      #1;
      check(a_err == (wa < 0), $sformatf("aggressive %b->%b code_err=%0b", 5'(pa), 5'(ta), a_err));
      if (wa >= 0) check(int'(a_out) == wa,
                         $sformatf("aggressive %b->%b word %0d expected %0d", 5'(pa), 5'(ta), a_out, wa));
      check(n_err == (wn < 0), $sformatf("non-aggressive %b->%b code_err=%0b", 5'(pn), 5'(tn), n_err));
      if (wn >= 0) check(int'(n_out) == wn,
                         $sformatf("non-aggressive %b->%b word %0d expected %0d", 5'(pn), 5'(tn), n_out, wn));
      if (wa < 0) n_err_seen++; else n_words++;
      pa = ta; pn = tn;
    end
    check(n_err_seen > 100, "errors were injected");
    $display("aggressive: %0d words, %0d code errors", n_words, n_err_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
