// rna_tb_pkg: reference arithmetic and an offline scheduler for the RNA
// testbenches.
//
// ref_mul / ref_add / ref_sig give the expected fixed-point results, written
// from the number format (16-bit, 8 fractional bits, saturating, products
// rounded toward minus infinity) and the piecewise-linear sigmoid breakpoints,
// using integer and real arithmetic rather than the RTL's shifts.
//
// rna_sched takes a multi-layer perceptron (layer sizes, weights, inputs),
// chooses for every layer full parallelism (FP), neuron extension (NE) or
// computation extension (CE) by comparing their cycle counts, and produces:
// the configuration words, one per cycle; the data FIFO stream; one weight
// stream per PE; where each output neuron ends up in the data memory; the
// expected outputs computed straight from the network (in the summation
// order of the chosen schedule); and the expected execution time.
package rna_tb_pkg;
  import rna_pkg::*;

  localparam int N_PAR = 16;   // n: neurons in parallel (FP/NE)
  localparam int M_PAR = 8;    // m: multipliers in parallel (CE)
  localparam int STG   = 4;

  typedef enum int {M_FP = 0, M_NE = 1, M_CE = 2} meth_e;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int ref_mul(int a, int b);
    longint p;
    longint q;
    p = longint'(a) * longint'(b);
    q = p / 256;
    if (p < 0 && (q * 256 != p)) q = q - 1;   // floor
    return sat16(q);
  endfunction

  function automatic int ref_add(int a, int b);
    return sat16(longint'(a) + longint'(b));
  endfunction

  function automatic int ref_sig(int x);
    real xr, y;
    int  yi;
    xr = (x < 0) ? -real'(x) / 256.0 : real'(x) / 256.0;
    if (xr >= 5.0)        y = 1.0;
    else if (xr >= 2.375) y = xr / 32.0 + 0.84375;
    else if (xr >= 1.0)   y = xr / 8.0 + 0.625;
    else                  y = xr / 4.0 + 0.5;
    yi = int'($floor(y * 256.0 + 1.0e-9));
    return (x < 0) ? 256 - yi : yi;
  endfunction

  // CE: input k of a group goes to multiplier PE ce_mul(k); the fixed tree
  // then sums (k0+k1)+(k2+k3) and (k4+k5)+(k6+k7).
  function automatic int ce_mul(int k);
    int t[8] = '{0, 4, 3, 7, 12, 8, 15, 11};
    return t[k];
  endfunction

  function automatic pe_cfg_t idle_pe();
    pe_cfg_t c;
    c = '0;
    c.fn  = FN_MUL;
    c.in1 = IN1_ZERO;
    c.in2 = IN2_ZERO;
    c.ps  = PS_ZERO;
    return c;
  endfunction

  function automatic cfg_t idle_cfg();
    cfg_t c;
    c = '0;
    c.valid = 1'b1;
    c.bc    = BC_HOLD;
    for (int p = 0; p < NUM_PE; p++) c.pe[p] = idle_pe();
    return c;
  endfunction

  // cycle counts of one layer on this hardware
  function automatic int cpc(meth_e m, int mi, int ni);
    case (m)
      M_FP:    return mi + 1;
      M_NE:    return mi * ((ni + N_PAR - 1) / N_PAR) + 1;
      default: return ((mi + M_PAR - 1) / M_PAR) * ni + $clog2(M_PAR) + 1;
    endcase
  endfunction

  class rna_sched;
    int        nl;                 // number of layers incl. input layer
    int        sz[];               // sz[0] inputs ... sz[nl-1] outputs
    int        w[][][];            // w[l][j][i], l >= 1
    int        x[];                // network inputs
    meth_e     meth[];             // method of layer l (l >= 1)
    int        val[][];            // expected neuron outputs
    int        loc_bank[][];
    int        loc_addr[][];
    cfg_t      cfgs[$];
    int        dq[$];
    int        wq[NUM_PE][$];
    int        tet;
    int        n_cfg;

    // mode 0: fewest cycles per layer; 1: FP/NE only; 2: CE on every layer
    // but the first (whose inputs arrive one per cycle through the DFIFO)
    function new(int sizes[], int mode);
      nl = sizes.size();
      sz = sizes;
      meth = new[nl];
      w    = new[nl];
      val  = new[nl];
      loc_bank = new[nl];
      loc_addr = new[nl];
      for (int l = 1; l < nl; l++) begin
        int t_fe, t_ce;
        t_fe = (sz[l] > N_PAR) ? cpc(M_NE, sz[l-1], sz[l]) : cpc(M_FP, sz[l-1], sz[l]);
        t_ce = cpc(M_CE, sz[l-1], sz[l]);
        if (l > 1 && ((mode == 0 && t_ce <= t_fe) || mode == 2)) meth[l] = M_CE;
        else meth[l] = (sz[l] > N_PAR) ? M_NE : M_FP;
        w[l] = new[sz[l]];
        for (int j = 0; j < sz[l]; j++) begin
          w[l][j] = new[sz[l-1]];
          for (int i = 0; i < sz[l-1]; i++)
            w[l][j][i] = int'($urandom_range(0, 1023)) - 512;   // -2 .. +2
        end
      end
      x = new[sz[0]];
      for (int i = 0; i < sz[0]; i++) x[i] = int'($urandom_range(0, 511)) - 256;
    endfunction

    // where output j of layer l is stored
    function void place(int l);
      int base;
      base = (l % 2) * 32;
      loc_bank[l] = new[sz[l]];
      loc_addr[l] = new[sz[l]];
      for (int j = 0; j < sz[l]; j++) begin
        case (meth[l])
          M_FP: begin loc_bank[l][j] = j;           loc_addr[l][j] = base; end
          M_NE: begin loc_bank[l][j] = j % N_PAR;   loc_addr[l][j] = base + j / N_PAR; end
          default: begin loc_bank[l][j] = 6;        loc_addr[l][j] = base + j; end
        endcase
      end
    endfunction

    // expected values, straight from the network
    function void golden();
      val[0] = x;
      for (int l = 1; l < nl; l++) begin
        val[l] = new[sz[l]];
        for (int j = 0; j < sz[l]; j++) begin
          int s;
          s = 0;
          if (meth[l] == M_CE) begin
            for (int g = 0; g < (sz[l-1] + M_PAR - 1) / M_PAR; g++) begin
              int pr[8];
              int t;
              for (int k = 0; k < 8; k++) begin
                int i;
                i = g * 8 + k;
                pr[k] = (i < sz[l-1]) ? ref_mul(val[l-1][i], w[l][j][i]) : 0;
              end
              t = ref_add(ref_add(ref_add(pr[0], pr[1]), ref_add(pr[2], pr[3])),
                          ref_add(ref_add(pr[4], pr[5]), ref_add(pr[6], pr[7])));
              s = ref_add(t, s);
            end
          end else begin
            for (int i = 0; i < sz[l-1]; i++)
              s = ref_add(ref_mul(val[l-1][i], w[l][j][i]), s);
          end
          val[l][j] = ref_sig(s);
        end
      end
    endfunction

    // data source of input i of layer l into the broadcast register
    function cfg_t bc_load(cfg_t c, int l, int i);
      if (l == 1) begin
        c.bc = BC_DFIFO;
        dq.push_back(x[i]);
      end else begin
        c.bc      = BC_MEM;
        c.bc_bank = bank_t'(loc_bank[l-1][i]);
        c.bc_addr = addr_t'(loc_addr[l-1][i]);
      end
      return c;
    endfunction

    function void build();
      cfgs.delete();
      dq.delete();
      foreach (wq[p]) wq[p].delete();
      tet = 0;
      for (int l = 1; l < nl; l++) begin
        int mi, ni, n0, len;
        cfg_t lc[];
        mi = sz[l-1];
        ni = sz[l];
        place(l);
        len = cpc(meth[l], mi, ni);
        lc = new[len];
        foreach (lc[c]) lc[c] = idle_cfg();
        case (meth[l])
          M_FP: begin
            for (int c = 0; c <= mi; c++) begin
              if (c < mi) lc[c] = bc_load(lc[c], l, c);
              for (int p = 0; p < ni; p++) begin
                lc[c].pe[p].fn  = FN_ACC;
                lc[c].pe[p].in1 = IN1_BCAST;
                if (c < mi) begin
                  lc[c].pe[p].in2 = IN2_WFIFO;
                  wq[p].push_back(w[l][p][c]);
                end
                lc[c].pe[p].ps = (c >= 2) ? PS_FB : PS_ZERO;
                if (c == mi) begin
                  lc[c].pe[p].sig     = 1'b1;
                  lc[c].pe[p].wr_en   = 1'b1;
                  lc[c].pe[p].wr_addr = addr_t'(loc_addr[l][p]);
                end
              end
            end
          end
          M_NE: begin
            int g_n;
            g_n = (ni + N_PAR - 1) / N_PAR;
            for (int c = 0; c <= mi * g_n; c++) begin
              int i, g, ia, ga;   // product formed now (i,g); sum finished now (ia,ga)
              i = c / g_n;  g = c % g_n;
              ia = (c - 1) / g_n;  ga = (c - 1) % g_n;
              if (c < mi * g_n && g == 0) lc[c] = bc_load(lc[c], l, i);
              for (int p = 0; p < N_PAR; p++) begin
                lc[c].pe[p].fn  = FN_ACC;
                lc[c].pe[p].in1 = IN1_BCAST;
                if (c < mi * g_n && g * N_PAR + p < ni) begin
                  lc[c].pe[p].in2 = IN2_WFIFO;
                  wq[p].push_back(w[l][g * N_PAR + p][i]);
                end
                if (c >= 1 && ga * N_PAR + p < ni) begin
                  int j;
                  j = ga * N_PAR + p;
                  lc[c].pe[p].ps      = (ia == 0) ? PS_ZERO : PS_MEM;
                  lc[c].pe[p].rd_bank = bank_t'(p);
                  lc[c].pe[p].rd_addr = addr_t'(loc_addr[l][j]);
                  lc[c].pe[p].sig     = (ia == mi - 1);
                  lc[c].pe[p].wr_en   = 1'b1;
                  lc[c].pe[p].wr_addr = addr_t'(loc_addr[l][j]);
                end
              end
            end
          end
          default: begin
            int g_n;
            g_n = (mi + M_PAR - 1) / M_PAR;
            for (int g = 0; g < g_n; g++) begin
              for (int j = 0; j < ni; j++) begin
                int c;
                c = g * ni + j;
                for (int k = 0; k < 8; k++) begin
                  int i, p;
                  i = g * 8 + k;
                  p = ce_mul(k);
                  lc[c].pe[p].fn = FN_MUL;
                  if (i < mi) begin
                    lc[c].pe[p].in2 = IN2_WFIFO;
                    wq[p].push_back(w[l][j][i]);
                    if (l == 1) begin
                      $fatal(1, "CE on the input layer is not supported by this generator");
                    end
                    lc[c].pe[p].in1     = IN1_MEM;
                    lc[c].pe[p].rd_bank = bank_t'(loc_bank[l-1][i]);
                    lc[c].pe[p].rd_addr = addr_t'(loc_addr[l-1][i]);
                  end
                end
                for (int q = 0; q < NUM_PE; q++) begin
                  int lvl;
                  lvl = (q == 1 || q == 2 || q == 13 || q == 14) ? 1 :
                        (q == 5 || q == 9) ? 2 : (q == 10) ? 3 : 0;
                  if (lvl != 0) begin
                    lc[c+lvl].pe[q].fn  = FN_ADD;
                    lc[c+lvl].pe[q].in1 = IN1_NEIGH;
                    lc[c+lvl].pe[q].in2 = IN2_NEIGH;
                  end
                end
                lc[c+4].pe[6].fn      = FN_ADD;
                lc[c+4].pe[6].in1     = IN1_NEIGH;
                lc[c+4].pe[6].in2     = (g == 0) ? IN2_ZERO : IN2_MEM;
                lc[c+4].pe[6].rd_bank = bank_t'(6);
                lc[c+4].pe[6].rd_addr = addr_t'(loc_addr[l][j]);
                lc[c+4].pe[6].sig     = (g == g_n - 1);
                lc[c+4].pe[6].wr_en   = 1'b1;
                lc[c+4].pe[6].wr_addr = addr_t'(loc_addr[l][j]);
              end
            end
          end
        endcase
        foreach (lc[c]) cfgs.push_back(lc[c]);
        tet += len;
      end
      cfgs[cfgs.size()-1].last = 1'b1;
      n_cfg = cfgs.size();
      tet += STG - 1;
      golden();
    endfunction
  endclass

endpackage
