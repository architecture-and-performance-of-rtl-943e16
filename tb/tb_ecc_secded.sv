// tb_ecc_secded: self-checking test of the (39,32) SECDED code.
// Known vectors: data 0 encodes to 0; data 1 sits at Hamming position 3, so
// check bits 1 and 2 and the overall parity are set (code 0xF). Random words
// must come back unchanged and unflagged, with every single-bit flip
// corrected and flagged single, and every double flip flagged double.
module tb_ecc_secded;
  logic [31:0] enc_data, dec_data;
  logic [38:0] enc_code, dec_code;
  logic        dec_single, dec_double;
  int checks = 0, failures = 0;

  ecc_secded dut (.enc_data, .enc_code, .dec_code, .dec_data, .dec_single, .dec_double);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [38:0] code;
    int a, b;
    enc_data = 0; dec_code = 0; #1;
    check(enc_code == 39'h0, "encode 0");
    check(dec_data == 0 && !dec_single && !dec_double, "decode 0");
    enc_data = 1; #1;
    check(enc_code == 39'hF, $sformatf("encode 1 = %h", enc_code));
    for (int r = 0; r < 300; r++) begin
      enc_data = $urandom; #1;
      code = enc_code;
      check(^code == 1'b0, "even overall parity");
      dec_code = code; #1;
      check(dec_data == enc_data && !dec_single && !dec_double, "clean word");
      a = $urandom % 39;
      dec_code = code ^ (39'd1 << a); #1;
      check(dec_data == enc_data && dec_single && !dec_double,
            $sformatf("single flip at %0d corrected", a));
      do b = $urandom % 39; while (b == a);
      dec_code = code ^ (39'd1 << a) ^ (39'd1 << b); #1;
      check(dec_double && !dec_single, $sformatf("double flip %0d,%0d detected", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
