// tb_enc8b10b_word: self-checking test of the 32->40 bit 8b/10b encoder.
//
// Checks: (1) a fixed word sequence against code words worked out by hand
// from the published 8b/10b tables (D0.0, D21.5, D7.7, D17.7, then K28.5,
// D31.7, D3.3, D0.0 with the running disparity carried along); (2) for 3000 random words, with a
// K28.5 in lane 0 of every fifth word, that every symbol has 4..6 ones,
// that the running disparity at symbol ends stays at +-1, that no run of
// equal bits is longer than 5, that the comma pattern 0011111/1100000
// appears only at the start of a K28.5 symbol, and that dec8b10b returns
// the original byte and K flag.
module tb_enc8b10b_word;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [31:0] data;
  logic [3:0]  is_k;
  logic [39:0] code;
  int checks = 0, failures = 0;

  enc8b10b_word dut (.clk(clk), .rst(rst), .data(data), .is_k(is_k), .code(code));

  always #2.5 clk = ~clk;

  logic [7:0] dec_d [4];
  logic       dec_k [4];
  logic       dec_e [4];
  for (genvar i = 0; i < 4; i++) begin : g_dec
    dec8b10b u_dec (.code(code[39-10*i -: 10]), .dout(dec_d[i]), .is_k(dec_k[i]), .err(dec_e[i]));
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stream property checker state
  int          disp;       // running disparity in units of bits (+1/-1)
  int          run_len;
  logic        last_bit;
  logic [6:0]  hist;       // last 7 bits
  int          bitpos;     // bit index within symbol of the newest bit
  logic        prev_k [4];

  typedef struct { logic [31:0] d; logic [3:0] k; logic [39:0] c; } vec_t;
  vec_t vecs [2];

  initial begin
    vecs[0] = '{32'h00_B5_E7_F1, 4'b0000,
                {10'b1001110100, 10'b1010101010, 10'b1110001110, 10'b1000110001}};
    vecs[1] = '{32'hBC_FF_63_00, 4'b1000,
                {10'b0011111010, 10'b0101001110, 10'b1100010011, 10'b0110001011}};
    data = '0; is_k = '0;
    disp = -1; run_len = 0; last_bit = 1'b0; hist = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // Known vectors
    for (int v = 0; v < 2; v++) begin
      data <= vecs[v].d; is_k <= vecs[v].k;
      @(posedge clk); #1;
      check(code == vecs[v].c, $sformatf("vector %0d: code %010h expected %010h", v, code, vecs[v].c));
    end
    // Random stream; disparity is positive after vector 1.
    disp = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] d;
      logic [3:0]  k;
      d = $urandom();
      k = (n % 5 == 0) ? 4'b1000 : 4'b0000;
      if (k[3]) d[31:24] = 8'hBC;
      data <= d; is_k <= k;
      @(posedge clk); #1;
      for (int l = 0; l < 4; l++) begin
        logic [9:0] s;
        int ones;
        s = code[39-10*l -: 10];
        ones = $countones(s);
        check(ones >= 4 && ones <= 6, $sformatf("word %0d lane %0d: %0d ones", n, l, ones));
        disp += ones * 2 - 10;
        check(disp == 1 || disp == -1, $sformatf("word %0d lane %0d: disparity %0d", n, l, disp));
        check(dec_d[l] == d[31-8*l -: 8] && dec_k[l] == k[3-l] && !dec_e[l],
              $sformatf("word %0d lane %0d: round trip %02h/%0d expected %02h/%0d",
                        n, l, dec_d[l], dec_k[l], d[31-8*l -: 8], k[3-l]));
        for (int b = 9; b >= 0; b--) begin
          if (s[b] == last_bit) run_len++;
          else run_len = 1;
          last_bit = s[b];
          hist = {hist[5:0], s[b]};
          if (n > 0 || l > 0 || b < 4) begin
            if (hist == 7'b0011111 || hist == 7'b1100000) begin
              // a comma must end at bit position 'c' of a K28.5 symbol
              check(k[3-l] && b == 3, $sformatf("word %0d lane %0d bit %0d: stray comma", n, l, b));
            end
            if (run_len > 5) begin
              failures++;
              $display("FAIL: run of %0d at word %0d", run_len, n);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
