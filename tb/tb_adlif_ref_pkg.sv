// tb_adlif_ref_pkg: reference model used by the testbenches.
//
// ref_neuron() computes one adLIF update directly from the equations
//   u_bar = alpha*u + (1-alpha)*(I-w),  spike = u_bar >= theta,
//   u_hat = u_bar - theta*spike,        w' = beta*w + (1-beta)*(a*u_hat + b*spike)
// in Q.5 fixed point: every product is shifted right by 5 (floor) and every
// result saturated to 12 bits. net_model holds a random fully connected
// network (weights, parameters, states, currents), writes its SRAM image in
// the accelerator's layout and steps it frame by frame to predict the output
// spikes and the final neuron states.
package tb_adlif_ref_pkg;

  function automatic int rsat(int v);
    if (v > 2047)  return 2047;
    if (v < -2048) return -2048;
    return v;
  endfunction

  function automatic int rmul(int x, int y);
    longint p;
    p = longint'(x) * longint'(y);
    return rsat(int'(p >>> 5));
  endfunction

  // returns {spike, u_new, w_new} through output arguments
  function automatic void ref_neuron(input int i_in, input int u, input int w,
                                     input int al, input int be, input int th,
                                     input int a, input int b,
                                     output int u_new, output int w_new, output bit spike);
    int ubar, wn, arg;
    ubar  = rsat(rmul(al, u) + rmul(rsat(32 - al), rsat(i_in - w)));
    spike = (ubar >= th);
    u_new = spike ? rsat(ubar - th) : ubar;
    arg   = spike ? rsat(rmul(a, u_new) + b) : rmul(a, u_new);
    wn    = rsat(rmul(be, w) + rmul(rsat(32 - be), arg));
    w_new = wn;
  endfunction

  function automatic int sx(input longint v, input int bits);
    longint m;
    m = longint'(1) << (bits - 1);
    v = v & ((longint'(1) << bits) - 1);
    return int'((v ^ m) - m);
  endfunction

  function automatic int lines4(input int x);
    return (x + 3) / 4;
  endfunction

  class net_model;
    int nl;
    int n[];
    int wt[][];            // wt[l][i*n[l+1]+j], l = 0 .. nl-2
    int pu[][], pw[][], pal[][], pbe[][], pth[][], pa[][], pb[][], cur[][];
    int base[];
    int end_line;

    // sizes: neurons per layer, input layer first
    function new(input int sizes[], input int wmin, input int wmax, input int neg_th_pct);
      nl = sizes.size();
      n  = new[nl];
      foreach (sizes[l]) n[l] = sizes[l];
      wt = new[nl];
      pu = new[nl]; pw = new[nl]; pal = new[nl]; pbe = new[nl]; pth = new[nl];
      pa = new[nl]; pb = new[nl]; cur = new[nl];
      for (int l = 0; l < nl - 1; l++) begin
        wt[l] = new[n[l] * n[l+1]];
        foreach (wt[l][x]) wt[l][x] = wmin + int'($urandom_range(0, wmax - wmin));
      end
      for (int l = 1; l < nl; l++) begin
        pu[l] = new[n[l]]; pw[l] = new[n[l]]; pal[l] = new[n[l]]; pbe[l] = new[n[l]];
        pth[l] = new[n[l]]; pa[l] = new[n[l]]; pb[l] = new[n[l]]; cur[l] = new[n[l]];
        for (int j = 0; j < n[l]; j++) begin
          pu[l][j]  = int'($urandom_range(0, 40)) - 20;
          pw[l][j]  = int'($urandom_range(0, 20)) - 10;
          pal[l][j] = 16 + int'($urandom_range(0, 15));
          pbe[l][j] = 20 + int'($urandom_range(0, 11));
          pth[l][j] = ($urandom_range(0, 99) < neg_th_pct) ? -int'($urandom_range(1, 16))
                                                            : 8 + int'($urandom_range(0, 40));
          pa[l][j]  = int'($urandom_range(0, 16)) - 8;
          pb[l][j]  = int'($urandom_range(0, 24));
          cur[l][j] = 0;
        end
      end
      base = new[nl];
      base[0] = 0;
      base[1] = n[0] * lines4(n[1]);
      for (int l = 1; l < nl; l++) begin
        int m;
        m = (l + 1 < nl) ? n[l+1] : 0;
        if (l + 1 < nl) base[l+1] = base[l] + 1 + lines4(n[l]) + n[l] * (7 + lines4(m));
        else end_line = base[l] + 1 + lines4(n[l]) + n[l] * (7 + lines4(m));
      end
    endfunction

    function int nrn_line(input int l, input int j);
      int m;
      m = (l + 1 < nl) ? n[l+1] : 0;
      return base[l] + 1 + lines4(n[l]) + j * (7 + lines4(m));
    endfunction

    // the SRAM image as (line, data) pairs
    function void image(ref int lines[$], ref bit [47:0] data[$]);
      bit [47:0] d;
      lines.delete(); data.delete();
      // input layer weights
      for (int i = 0; i < n[0]; i++)
        for (int r = 0; r < lines4(n[1]); r++) begin
          d = '0;
          for (int e = 0; e < 4; e++)
            if (r*4 + e < n[1]) d[e*8 +: 8] = 8'(wt[0][i*n[1] + r*4 + e]);
          lines.push_back(i * lines4(n[1]) + r); data.push_back(d);
        end
      for (int l = 1; l < nl; l++) begin
        int m;
        m = (l + 1 < nl) ? n[l+1] : 0;
        lines.push_back(base[l]); data.push_back(48'((l + 2 < nl) ? n[l+2] : 0));
        for (int r = 0; r < lines4(n[l]); r++) begin
          d = '0;
          for (int e = 0; e < 4; e++)
            if (r*4 + e < n[l]) d[e*12 +: 12] = 12'(cur[l][r*4 + e]);
          lines.push_back(base[l] + 1 + r); data.push_back(d);
        end
        for (int j = 0; j < n[l]; j++) begin
          int nb;
          nb = nrn_line(l, j);
          lines.push_back(nb + 0); data.push_back(48'(12'(pu[l][j])));
          lines.push_back(nb + 1); data.push_back(48'(12'(pw[l][j])));
          lines.push_back(nb + 2); data.push_back(48'(8'(pal[l][j])));
          lines.push_back(nb + 3); data.push_back(48'(8'(pbe[l][j])));
          lines.push_back(nb + 4); data.push_back(48'(8'(pth[l][j])));
          lines.push_back(nb + 5); data.push_back(48'(8'(pa[l][j])));
          lines.push_back(nb + 6); data.push_back(48'(8'(pb[l][j])));
          for (int r = 0; r < lines4(m); r++) begin
            d = '0;
            for (int e = 0; e < 4; e++)
              if (r*4 + e < m) d[e*8 +: 8] = 8'(wt[l][j*m + r*4 + e]);
            lines.push_back(nb + 7 + r); data.push_back(d);
          end
        end
      end
    endfunction

    // one time-step; returns output-layer spikes in index order and the
    // number of hidden spikes (fan-out events)
    function void step(input int spk[$], ref int outs[$], ref int hidden_spikes,
                       ref int saturations);
      outs.delete();
      foreach (spk[k])
        for (int j = 0; j < n[1]; j++) begin
          int s;
          s = cur[1][j] + wt[0][spk[k]*n[1] + j];
          if (s != rsat(s)) saturations++;
          cur[1][j] = rsat(s);
        end
      for (int l = 1; l < nl; l++)
        for (int j = 0; j < n[l]; j++) begin
          int un, wn;
          bit sp;
          ref_neuron(cur[l][j], pu[l][j], pw[l][j], pal[l][j], pbe[l][j], pth[l][j],
                     pa[l][j], pb[l][j], un, wn, sp);
          pu[l][j] = un; pw[l][j] = wn; cur[l][j] = 0;
          if (sp) begin
            if (l == nl - 1) outs.push_back(j);
            else begin
              hidden_spikes++;
              for (int q = 0; q < n[l+1]; q++) begin
                int s;
                s = cur[l+1][q] + wt[l][j*n[l+1] + q];
                if (s != rsat(s)) saturations++;
                cur[l+1][q] = rsat(s);
              end
            end
          end
        end
    endfunction
  endclass

endpackage
