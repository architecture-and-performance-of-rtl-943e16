// ecc_secded: single-error-correcting, double-error-detecting code for one
// 32-bit longword of the MPM memory board.
//
// A (39,32) extended Hamming code. The encoder places the 32 data bits at
// the non-power-of-two positions 3..38 of a 38-bit Hamming word, computes the
// six check bits at positions 1,2,4,8,16,32 and appends an overall parity
// bit. The decoder recomputes the syndrome: a zero syndrome with good parity
// is a clean word; a non-zero syndrome with bad parity is a single error at
// the syndrome position, which is flipped back; bad parity alone is an error
// in the parity bit; a non-zero syndrome with good parity is a double error
// (uncorrectable). Purely combinational.
// Interface: enc_data -> enc_code (39 bits); dec_code -> dec_data,
// dec_single (corrected), dec_double (detected, data not trusted).
// The board's single-bit correction and multi-bit detection are from the
// system's description; the choice of code and bit layout is this design's.
module ecc_secded (
  input  logic [31:0] enc_data,
  output logic [38:0] enc_code,
  input  logic [38:0] dec_code,
  output logic [31:0] dec_data,
  output logic        dec_single,
  output logic        dec_double
);
  // code word layout: bit 0 = overall parity, bits 1..38 = Hamming positions
  function automatic logic [38:0] place(input logic [31:0] d);
    logic [38:0] w;
    int unsigned k;
    w = '0;
    k = 0;
    for (int unsigned p = 1; p <= 38; p++) begin
      if ((p & (p - 1)) != 0) begin
        w[p] = d[k];
        k++;
      end
    end
    return w;
  endfunction

  function automatic logic [31:0] extract(input logic [38:0] w);
    logic [31:0] d;
    int unsigned k;
    d = '0;
    k = 0;
    for (int unsigned p = 1; p <= 38; p++) begin
      if ((p & (p - 1)) != 0) begin
        d[k] = w[p];
        k++;
      end
    end
    return d;
  endfunction

  // syndrome over positions 1..38 (check bits included)
  function automatic logic [5:0] syndrome(input logic [38:0] w);
    logic [5:0] s;
    s = '0;
    for (int unsigned p = 1; p <= 38; p++)
      if (w[p]) s = s ^ 6'(p);
    return s;
  endfunction

  always_comb begin
    logic [38:0] w;
    logic [5:0]  s;
    w = place(enc_data);
    s = syndrome(w);                       // check bits still zero here
    for (int unsigned b = 0; b < 6; b++) w[1 << b] = s[b];
    w[0] = ^w[38:1];
    enc_code = w;
  end

  always_comb begin
    logic [38:0] w;
    logic [5:0]  s;
    logic        par_bad;
    w       = dec_code;
    s       = syndrome(w);
    par_bad = ^w;
    dec_single = 1'b0;
    dec_double = 1'b0;
    if (par_bad) begin
      dec_single = 1'b1;
      if (s != '0 && s <= 6'd38) w[s] = ~w[s];
      else if (s != '0) dec_double = 1'b1;  // points outside the word
      if (s > 6'd38) dec_single = 1'b0;
    end else if (s != '0) begin
      dec_double = 1'b1;
    end
    dec_data = extract(w);
  end
endmodule
