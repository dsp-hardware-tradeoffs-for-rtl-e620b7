// tb_dpd_pkg: reference model of the predistorter for the testbenches.
//
// dpd_model keeps its own copy of the dictionary, the coefficients and the
// basis function memory and computes, per input sample, y(n) = sum_r
// theta_r phi_r(n) twice: in binary32, with correctly rounded operations in
// the order the datapath uses (bit-accurate expectation), and in double
// precision complex arithmetic (accuracy expectation). It also returns the
// number of cycles a sample takes: 3 + n0 + n1 + 4*n2.
// op_schedule lists the control words the basis function generator expects
// for one dictionary entry, cycle by cycle (one for type 0 and type I, four
// for type II: read phi_i, phi_j, phi_k into the operand registers, then
// compute and write).
package tb_dpd_pkg;
  import dpd_pkg::*;
  import tb_fp_pkg::*;

  localparam int MAXN = 32;
  localparam int MAXD = 16;

  function automatic void op_schedule(entry_t e, int idx, ref bfg_ctrl_t q[$]);
    bfg_ctrl_t w;
    q = {};
    w = '0;
    w.out_sel = e.op;
    w.wr_row  = field_t'(idx);
    case (e.op)
      OP_TYPE1: begin
        w.rd_en = 1'b1; w.rd_row = e.f1 - 1; w.rd_col = e.f2; w.wr_en = 1'b1;
        q.push_back(w);
      end
      OP_TYPE2: begin
        bfg_ctrl_t r;
        r = w;
        r.rd_en = 1'b1; r.rd_col = '0;
        r.rd_row = e.f1 - 1; r.ld_sel = LD_A; q.push_back(r);
        r.rd_row = e.f2 - 1; r.ld_sel = LD_B; q.push_back(r);
        r.rd_row = e.f3 - 1; r.ld_sel = LD_C; q.push_back(r);
        w.wr_en = 1'b1;
        q.push_back(w);
      end
      default: begin
        w.wr_en = 1'b1;
        q.push_back(w);
      end
    endcase
  endfunction

  class dpd_model;
    int     n, d;
    entry_t tbl  [MAXN];
    cfp_t   coef [MAXN];
    cfp_t   mem  [MAXN][MAXD+1];
    real    mre  [MAXN][MAXD+1];
    real    mim  [MAXN][MAXD+1];

    function new(int n_basis, int depth);
      n = n_basis;
      d = depth;
      for (int r = 0; r < MAXN; r++) begin
        tbl[r]  = '0;
        coef[r] = '0;
      end
      reset();
    endfunction

    function void reset();
      for (int r = 0; r < MAXN; r++)
        for (int c = 0; c <= MAXD; c++) begin
          mem[r][c] = '0;
          mre[r][c] = 0.0;
          mim[r][c] = 0.0;
        end
    endfunction

    function int cycles_per_sample();
      int cyc;
      cyc = 3;
      for (int r = 0; r < n; r++) cyc += (tbl[r].op == OP_TYPE2) ? 4 : 1;
      return cyc;
    endfunction

    // Processes one sample; y is the bit-accurate result, (yr, yi) the double
    // precision one and mag the sum of |theta_r phi_r| (scale for tolerance).
    function void step(cfp_t x, output cfp_t y, output real yr, output real yi, output real mag);
      cfp_t acc, phi;
      real  ar, ai, pr, pi, t1r, t1i;
      for (int r = 0; r < n; r++)
        for (int c = d; c >= 1; c--) begin
          mem[r][c] = mem[r][c-1];
          mre[r][c] = mre[r][c-1];
          mim[r][c] = mim[r][c-1];
        end
      acc = '0; ar = 0.0; ai = 0.0; mag = 0.0;
      for (int r = 0; r < n; r++) begin
        entry_t e;
        int i, j, k;
        real cr, ci;
        e = tbl[r];
        i = int'(e.f1) - 1; j = int'(e.f2) - 1; k = int'(e.f3) - 1;
        case (e.op)
          OP_TYPE0: begin
            phi = x; pr = fp32_to_real(x.re); pi = fp32_to_real(x.im);
          end
          OP_TYPE1: begin
            phi = mem[i][e.f2]; pr = mre[i][e.f2]; pi = mim[i][e.f2];
          end
          default: begin
            phi = ref_cmul(ref_cmul(mem[i][0], mem[j][0], 1'b0), mem[k][0], 1'b1);
            t1r = mre[i][0] * mre[j][0] - mim[i][0] * mim[j][0];
            t1i = mre[i][0] * mim[j][0] + mim[i][0] * mre[j][0];
            pr  = t1r * mre[k][0] + t1i * mim[k][0];
            pi  = t1i * mre[k][0] - t1r * mim[k][0];
          end
        endcase
        mem[r][0] = phi; mre[r][0] = pr; mim[r][0] = pi;
        acc = ref_cadd(acc, ref_cmul(coef[r], phi, 1'b0));
        cr = fp32_to_real(coef[r].re);
        ci = fp32_to_real(coef[r].im);
        ar += cr * pr - ci * pi;
        ai += cr * pi + ci * pr;
        mag += (cr < 0 ? -cr : cr) * ((pr < 0 ? -pr : pr) + (pi < 0 ? -pi : pi))
             + (ci < 0 ? -ci : ci) * ((pr < 0 ? -pr : pr) + (pi < 0 ? -pi : pi));
      end
      y = acc; yr = ar; yi = ai;
    endfunction
  endclass

  // A random dictionary with the given operation order ('0', '1', '2' per
  // entry; entry 0 must be type 0): type II operands drawn from earlier
  // entries, type I reading an earlier entry with delay 1..d.
  function automatic entry_t rand_entry(op_type_e op, int idx, int d);
    entry_t e;
    e.op = op;
    case (op)
      OP_TYPE0: begin e.f1 = '0; e.f2 = '0; e.f3 = '0; end
      OP_TYPE1: begin
        e.f1 = field_t'(1 + $urandom_range(idx - 1));
        e.f2 = field_t'(1 + $urandom_range(d - 1));
        e.f3 = '0;
      end
      default: begin
        e.f1 = field_t'(1 + $urandom_range(idx - 1));
        e.f2 = field_t'(1 + $urandom_range(idx - 1));
        e.f3 = field_t'(1 + $urandom_range(idx - 1));
      end
    endcase
    return e;
  endfunction

endpackage
