// tb_ref_pkg -- reference model and stimulus shared by the testbenches.
//
// ref_compress works the encoding out with signed 64-bit arithmetic, independently
// of the RTL: the difference Bi-B0 is taken modulo 2^32 and read as a signed
// 32-bit number; a delta of D bytes holds its magnitude, the header holds its sign.
// gen_line draws a cache line of a requested class (0 zero, 1 repeat, 2 small
// deltas, 3 medium deltas, 4 random), with deltas placed near the class limits.
package tb_ref_pkg;
  import noc_comp_pkg::*;

  typedef struct {
    enc_t      enc;
    bit [2:0]  sign;
    body_t     body;
    int        nflits;
  } ref_t;

  function automatic longint sdiff(word_t a, word_t b);
    longint d;
    d = longint'(a) - longint'(b);          // exact difference of unsigned words
    if (d >= 64'sh8000_0000)  d -= 64'sh1_0000_0000;
    if (d < -64'sh8000_0000)  d += 64'sh1_0000_0000;
    return d;                                // in [-2^31, 2^31)
  endfunction

  function automatic bit fits(line_t l, int dbytes);
    longint d;
    for (int i = 1; i < 4; i++) begin
      d = sdiff(l[i], l[0]);
      if (d < 0) d = -d;
      if (d >= (64'sd1 << (8 * dbytes))) return 0;
    end
    return 1;
  endfunction

  function automatic ref_t ref_compress(line_t l);
    ref_t   r;
    int     db;
    longint d;
    r.sign = '0;
    r.body = '0;
    if (l[0] == 0 && l[1] == 0 && l[2] == 0 && l[3] == 0) begin
      r.enc = ENC_ZERO; r.nflits = 1; return r;
    end
    if (l[1] == l[0] && l[2] == l[0] && l[3] == l[0]) begin
      r.enc = ENC_REP; r.nflits = 2; r.body[31:0] = l[0]; return r;
    end
    db = fits(l, 1) ? 1 : (fits(l, 2) ? 2 : 0);
    if (db == 0) begin
      r.enc = ENC_NONE; r.nflits = 5; r.body = l; return r;
    end
    r.enc = (db == 1) ? ENC_B4D1 : ENC_B4D2;
    r.nflits = (db == 1) ? 3 : 4;
    r.body[31:0] = l[0];
    for (int i = 1; i < 4; i++) begin
      d = sdiff(l[i], l[0]);
      r.sign[i-1] = (d < 0);
      if (d < 0) d = -d;
      for (int b = 0; b < 8 * db; b++) r.body[32 + (i-1)*8*db + b] = d[b];
    end
    return r;
  endfunction

  function automatic word_t near(word_t base, int limit);
    int mag;
    int pick;
    pick = $urandom_range(3, 0);
    case (pick)
      0: mag = limit - 1;
      1: mag = $urandom_range(limit - 1, 0);
      2: mag = 0;
      default: mag = $urandom_range(limit - 1, limit / 2);
    endcase
    return ($urandom_range(1, 0) == 1) ? base + word_t'(mag) : base - word_t'(mag);
  endfunction

  function automatic line_t gen_line(int cls);
    line_t l;
    word_t b;
    b = $urandom;
    if ($urandom_range(7, 0) == 0) b = 32'hFFFF_FFF0 + $urandom_range(15, 0);  // wrap-around
    l[0] = b;
    case (cls)
      0: l = '0;
      1: l = {b, b, b, b};
      2: for (int i = 1; i < 4; i++) l[i] = near(b, 256);
      3: begin
        for (int i = 1; i < 4; i++) l[i] = near(b, 65536);
        l[1] = ($urandom_range(1, 0) == 1) ? b + 32'd256 + $urandom_range(1000, 0)
                                           : b - 32'd256 - $urandom_range(1000, 0);
      end
      default: for (int i = 1; i < 4; i++) l[i] = $urandom;
    endcase
    return l;
  endfunction

endpackage
