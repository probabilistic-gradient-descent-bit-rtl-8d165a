// pgdbf_ref_model.svh: bit-accurate reference model of FM-PGDBF decoding,
// included into the decoder testbenches. The including module defines the
// code (N, M, DV, DC, Z, S, L, IT_MAX, P0_PERMILLE, RG_SEED) and the
// functions tb_shift(i,j) and tb_thr(k). The model is written independently
// of the RTL: it builds the Tanner graph as adjacency lists, computes checks
// and energies with plain loops and keeps its own copy of the rotating random
// register (only the register's reset pattern is taken from the package, as
// it is a constant of the design).

int unsigned rm_cn [M][DC];    // bit index of each edge of check m
int unsigned rm_vc [N][DV];    // check index of each edge of bit n
bit          rm_y  [N];
bit          rm_v  [N];
bit          rm_rg [S];
int          rm_iters;
bit          rm_success;
// events seen over all frames decoded by the model
int          ev_masked;        // a candidate bit not flipped because R_n = 0
int          ev_idle_iter;     // an iteration in which no bit reached the threshold and R_n
int          ev_low_thr_flip;  // a flip made at a threshold below the column weight
int          ev_wrap;          // an iteration that used the sequence after wrapping

function automatic void rm_build_graph();
  for (int i = 0; i < DV; i++)
    for (int j = 0; j < DC; j++)
      for (int r = 0; r < Z; r++) begin
        int unsigned n;
        n = j * Z + ((r + tb_shift(i, j)) % Z);
        rm_cn[i*Z + r][j] = n;
        rm_vc[n][i]       = i * Z + r;
      end
endfunction

function automatic void rm_rg_reset();
  for (int b = 0; b < S; b++) rm_rg[b] = fm_pgdbf_pkg::rg_init_bit(b, RG_SEED, P0_PERMILLE);
endfunction

function automatic bit rm_check(int unsigned m);
  bit p = 0;
  for (int j = 0; j < DC; j++) p ^= rm_v[rm_cn[m][j]];
  return p;
endfunction

// Decode rm_y; leaves rm_v, rm_iters, rm_success.
function automatic void rm_decode();
  bit syn [M];
  bit nxt [N];
  bit rgn [S];
  rm_v     = rm_y;
  rm_iters = 0;
  forever begin
    bit any = 0;
    int flips = 0;
    int unsigned thr;
    for (int m = 0; m < M; m++) begin syn[m] = rm_check(m); any |= syn[m]; end
    if (!any) begin rm_success = 1; return; end
    if (rm_iters == IT_MAX) begin rm_success = 0; return; end
    thr = tb_thr(rm_iters % L);
    if (rm_iters >= L) ev_wrap++;
    for (int n = 0; n < N; n++) begin
      int unsigned e;
      e = (rm_v[n] != rm_y[n]) ? 1 : 0;
      for (int d = 0; d < DV; d++) e += syn[rm_vc[n][d]];
      nxt[n] = rm_v[n];
      if (e >= thr) begin
        if (rm_rg[n % S]) begin nxt[n] = !rm_v[n]; flips++; end
        else ev_masked++;
      end
    end
    if (flips == 0) ev_idle_iter++;
    if (flips != 0 && thr < DV) ev_low_thr_flip++;
    rm_v = nxt;
    for (int b = 0; b < S; b++) rgn[b] = rm_rg[(b + S - 1) % S];
    rm_rg = rgn;
    rm_iters++;
  end
endfunction
