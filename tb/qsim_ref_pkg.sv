// qsim_ref_pkg: reference model of the MULT constraint check, written
// independently of the RTL for the testbenches.
//
// Magnitudes are handled as plain integers: a qmag is turned into its signed
// position and an infinity flag, signs into -1/0/+1, and each rule of SF1, SF2
// and SF3 is evaluated with integer arithmetic instead of the RTL's sign-code
// tables. It also builds random encoded values and instruction words, and
// models the coprocessor at instruction level (class ccf_model).
package qsim_ref_pkg;
  import qsim_pkg::*;

  function automatic int ipos(qmag_t m);
    return int'(m.pos);
  endfunction

  function automatic int isgn(int v);
    return (v > 0) ? 1 : (v < 0) ? -1 : 0;
  endfunction

  function automatic int idir(sgn_t d);
    return (d == 2'b01) ? 1 : (d == 2'b11) ? -1 : 0;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Can a + b (a, b in -1/0/+1) have sign r?
  function automatic bit sum_allows(int a, int b, int r);
    if (a != 0 && b != 0 && a != b) return 1;
    return isgn(a + b) == r;
  endfunction

  function automatic bit ref_sf1(qval_t x, qval_t y, qval_t z);
    int sx = isgn(ipos(x.mag)), sy = isgn(ipos(y.mag)), sz = isgn(ipos(z.mag));
    if (sz != sx * sy) return 0;
    return sum_allows(sx * idir(y.dir), sy * idir(x.dir), idir(z.dir));
  endfunction

  function automatic bit ref_sf2(qmag_t x, qmag_t y, qmag_t z);
    if (x.inf && ipos(y) == 0) return 0;
    if (y.inf && ipos(x) == 0) return 0;
    if (x.inf || y.inf) return z.inf;
    return !z.inf;
  endfunction

  function automatic bit ref_sf3(qmag_t x, qmag_t y, qmag_t z, cval_tuple_t t);
    int ox, oy, oz;
    if (t.c1.inf || t.c2.inf || t.c3.inf) return 1;
    if (ipos(t.c1) == 0 || ipos(t.c2) == 0 || ipos(t.c3) == 0) return 1;
    if (isgn(ipos(x)) != isgn(ipos(t.c1))) return 1;
    if (isgn(ipos(y)) != isgn(ipos(t.c2))) return 1;
    if (isgn(ipos(z)) != isgn(ipos(t.c3))) return 1;
    ox = isgn(iabs(ipos(x)) - iabs(ipos(t.c1)));
    oy = isgn(iabs(ipos(y)) - iabs(ipos(t.c2)));
    oz = isgn(iabs(ipos(z)) - iabs(ipos(t.c3)));
    return sum_allows(ox, oy, oz);
  endfunction

  // Random magnitude: mostly small positions so that relations hit often.
  function automatic qmag_t rand_qmag(bit allow_inf);
    qmag_t m;
    int p = int'($urandom_range(0, 12)) - 6;
    m.pos = POS_W'(p);
    m.inf = 1'b0;
    if (allow_inf && p != 0 && p % 2 == 0 && $urandom_range(0, 3) == 0) m.inf = 1'b1;
    return m;
  endfunction

  function automatic sgn_t rand_dir();
    case ($urandom_range(0, 2))
      0: return 2'b00;
      1: return 2'b01;
      default: return 2'b11;
    endcase
  endfunction

  function automatic qval_t rand_qval(bit allow_inf);
    qval_t q;
    q.mag = rand_qmag(allow_inf);
    q.dir = rand_dir();
    return q;
  endfunction

  // A finite landmark (even, possibly zero) for a corresponding value.
  function automatic qmag_t rand_landmark();
    qmag_t m;
    m.pos = POS_W'(2 * (int'($urandom_range(0, 6)) - 3));
    m.inf = ($urandom_range(0, 15) == 0);
    return m;
  endfunction

  function automatic cval_tuple_t rand_tuple();
    cval_tuple_t t;
    t.c1 = rand_landmark();
    t.c2 = rand_landmark();
    t.c3 = rand_landmark();
    return t;
  endfunction

  function automatic logic [31:0] w_exec(qval_t a, qval_t b, qval_t c);
    return {2'b11, a, b, c};
  endfunction

  function automatic logic [31:0] w_append(cval_tuple_t t);
    return {2'b10, 6'd0, t};
  endfunction

  function automatic logic [31:0] w_clear();
    return {2'b01, 30'd0};
  endfunction

  function automatic qmag_t mkq(int p, bit i = 0);
    return '{inf: i, pos: POS_W'(p)};
  endfunction

  // A triple that often passes SF1 and SF2, so that SF3 gets exercised.
  function automatic logic [31:0] rand_exec();
    qval_t a = rand_qval(1), b = rand_qval(1), z = rand_qval(1);
    if ($urandom_range(0, 4) != 0) begin
      int s, p;
      s = isgn(int'(a.mag.pos)) * isgn(int'(b.mag.pos));
      p = int'($urandom_range(1, 6));
      z.mag.pos = POS_W'(s * p);
      z.mag.inf = (a.mag.inf || b.mag.inf) && s != 0;
      if (z.mag.inf) z.mag.pos = POS_W'(s * 8);
      if ($urandom_range(0, 3) != 0)
        z.dir = sgn_t'(isgn(isgn(int'(a.mag.pos)) * idir(b.dir) +
                            isgn(int'(b.mag.pos)) * idir(a.dir)));
    end
    return w_exec(a, b, z);
  endfunction

  // A tuple on the same sides as the usual positive operands, to make SF3 bite.
  function automatic cval_tuple_t near_tuple();
    cval_tuple_t t;
    if ($urandom_range(0, 2) == 0) return rand_tuple();
    t.c1 = mkq(2 * int'($urandom_range(1, 3)));
    t.c2 = mkq(2 * int'($urandom_range(1, 3)));
    t.c3 = mkq(2 * int'($urandom_range(1, 3)));
    if ($urandom_range(0, 1) == 0) begin t.c1.pos = -t.c1.pos; t.c3.pos = -t.c3.pos; end
    return t;
  endfunction

  // Model of the whole coprocessor at instruction level: the tuple list, the
  // circular read pointer and the result word of every EXEC. It also counts
  // how often each mechanism occurs.
  class ccf_model;
    int          depth;
    cval_tuple_t list [$];
    int          ptr;
    int          n_term [4];   // by terminating subfunction, 0 = passed
    int          n_case [7];   // measurement cases 1..6
    int          n_empty, n_wrap, n_drop, n_clear, n_exec;
    int          last_k;       // tuples examined by the last EXEC, at least 1

    function new(int d);
      depth = d;
      ptr = 0;
      foreach (n_term[i]) n_term[i] = 0;
      foreach (n_case[i]) n_case[i] = 0;
      n_empty = 0; n_wrap = 0; n_drop = 0; n_clear = 0; n_exec = 0; last_k = 1;
    endfunction

    // Bit 32 of the return value is set when the instruction produces a
    // result word, which is then bits 31:0.
    function logic [32:0] apply(logic [31:0] w);
      qval_t a, b, z;
      int cause, it, n, idx;
      logic [31:0] res;
      res = '0;
      case (w[31:30])
        2'b01: begin list.delete(); ptr = 0; n_clear++; end
        2'b10: begin
          if (list.size() < depth) list.push_back(cval_tuple_t'(w[23:0]));
          else n_drop++;
        end
        2'b11: begin
          {a, b, z} = w[29:0];
          cause = 0; it = 0; n = list.size();
          if (!ref_sf1(a, b, z)) cause = 1;
          else if (!ref_sf2(a.mag, b.mag, z.mag)) cause = 2;
          else begin
            if (n == 0) n_empty++;
            for (int k = 0; k < n; k++) begin
              idx = (ptr + k) % n;
              if (idx == 0 && k > 0) n_wrap++;
              if (!ref_sf3(a.mag, b.mag, z.mag, list[idx])) begin
                cause = 3; it = k + 1; ptr = idx;
                break;
              end
            end
            if (cause == 0) it = n;
          end
          n_term[cause]++;
          n_exec++;
          if (cause == 1) n_case[1]++;
          else if (cause == 2) n_case[2]++;
          else if (cause == 3 && it <= 4) n_case[2 + it]++;
          last_k = (it > 1) ? it : 1;
          res = {7'd0, (n == depth), 8'(n), 8'(it), 5'd0, 2'(cause), (cause == 0)};
          return {1'b1, res};
        end
        default: ;
      endcase
      return '0;
    endfunction
  endclass
endpackage
