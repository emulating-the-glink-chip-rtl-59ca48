// glink_ref_pkg: reference model of the CIMT line code used by the
// testbenches. It is written out from the code definition (field layout,
// C-field codes, dummy bits, idle patterns, inversion) independently of the
// RTL, so that the testbenches can build expected words and expected
// decoder results themselves.
package glink_ref_pkg;

  typedef struct {
    int          kind;     // 0 idle, 1 data, 2 control
    logic [15:0] payload;
    logic        flag_s;
    logic        error;
  } ref_dec_t;

  function automatic int ones20(input logic [19:0] w);
    int n = 0;
    for (int i = 0; i < 20; i++) if (w[i]) n++;
    return n;
  endfunction

  function automatic int disp20(input logic [19:0] w);
    return 2 * ones20(w) - 20;
  endfunction

  // 2'b10 more ones, 2'b01 more zeros, 2'b00 balanced
  function automatic logic [1:0] sign2(input int d);
    return (d > 0) ? 2'b10 : (d < 0) ? 2'b01 : 2'b00;
  endfunction

  // Non-inverted word for a given kind / payload / Flag'.
  function automatic logic [19:0] ref_plain(input int kind, input logic [15:0] p,
                                            input logic fs, input logic enh);
    logic [19:0] w;
    if (kind == 1) begin
      w = {(fs ? 4'b1011 : 4'b1101), p[15:1], (enh ? (p[0] ^ fs) : p[0])};
    end else if (kind == 2) begin
      w = {4'b0011, p[13:7], 1'b0, 1'b1, p[6:0]};
    end else begin
      w = {4'b0011, (fs ? 16'b0000000_10_1111111 : 16'b1111111_10_0000000)};
    end
    return w;
  endfunction

  // Reference decoder (written from the code table, not from the RTL).
  function automatic ref_dec_t ref_decode(input logic [19:0] w, input logic enh);
    ref_dec_t r;
    logic [3:0]  c = w[19:16];
    logic [15:0] d = w[15:0];
    r.kind = 0; r.payload = '0; r.flag_s = 1'b0; r.error = 1'b0;
    if (c == 4'b1101 || c == 4'b1011 || c == 4'b0010 || c == 4'b0100) begin
      logic inv = (c == 4'b0010 || c == 4'b0100);
      r.kind   = 1;
      r.flag_s = (c == 4'b1011 || c == 4'b0100);
      r.payload = inv ? ~d : d;
      if (enh) r.payload[0] = r.payload[0] ^ r.flag_s;
    end else if (c == 4'b0011 && d == 16'hFF00) begin
      r.kind = 0; r.flag_s = 1'b0;
    end else if (c == 4'b0011 && d == 16'h017F) begin
      r.kind = 0; r.flag_s = 1'b1;
    end else if (c == 4'b0011 && d[8] == 1'b0 && d[7] == 1'b1) begin
      r.kind = 2; r.payload = {2'b00, d[15:9], d[6:0]};
    end else if (c == 4'b1100 && d[8] == 1'b1 && d[7] == 1'b0) begin
      r.kind = 2; r.payload = {2'b00, ~d[15:9], ~d[6:0]};
    end else begin
      r.error = 1'b1;
    end
    return r;
  endfunction

  // One step of the x^7 + x^6 + 1 generator; returns the new bit.
  function automatic logic pn_step(ref logic [6:0] s);
    logic b = s[6] ^ s[5];
    s = {s[5:0], b};
    return b;
  endfunction

endpackage
