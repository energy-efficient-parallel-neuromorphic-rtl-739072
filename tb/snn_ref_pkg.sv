// snn_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL structure: multipliers as integer
// arithmetic on the product and on Booth digit values, the LFSR as a plain
// shift rule, the memory initial contents and the complete two-layer network
// (neuron operation stage, fire check, inhibitory neurons and STDP learning)
// as a class that steps the same algorithm in software order.
package snn_ref_pkg;

  function automatic int ref_mult_exact(int a, int b);
    longint p;
    p = (longint'(a) * longint'(b) + 32768) >>> 16;
    return int'(p[15:0]) - ((p[15]) ? 65536 : 0);
  endfunction

  // Booth digit i of a 16-bit two's complement b: value in {-2..2}
  function automatic int booth_digit(int b, int i);
    int t, b17;
    b17 = (b & 16'hFFFF) << 1;
    t = (b17 >> (2*i)) & 7;
    case (t)
      0, 7: return 0;
      1, 2: return 1;
      3:    return 2;
      4:    return -2;
      default: return -1;
    endcase
  endfunction

  // approximate multiplier: sum of each partial product floored to column 15
  // (a negative row is -|d|A-1 in one's complement, its +1 correction is
  // below column 15 and lost), rounding 1 in column 15, then a compensation
  // chosen from the number of zero Booth digits.
  function automatic int ref_mult_approx(int a, int b);
    longint h, row;
    int d, nz, comp, r;
    h = 0; nz = 0;
    for (int i = 0; i < 8; i++) begin
      d = booth_digit(b, i);
      if (d == 0) nz++;
      row = longint'(d) * longint'(a) - ((d < 0) ? 1 : 0);
      row = row * (longint'(1) << (2*i));
      // floor division by 2^15
      if (row >= 0) h += row / 32768;
      else          h += -((-row + 32767) / 32768);
    end
    comp = (nz <= 1) ? 2 : ((nz <= 5) ? 1 : 0);
    h = (h + 1);
    if (h >= 0) h = h / 2; else h = -((-h + 1) / 2);
    r = int'(h) + comp;
    r = r & 16'hFFFF;
    return (r >= 32768) ? r - 65536 : r;
  endfunction

  function automatic int ref_mult(bit approx, int a, int b);
    return approx ? ref_mult_approx(a, b) : ref_mult_exact(a, b);
  endfunction

  function automatic int lfsr_next(int x);
    // Galois form of x^16 + x^14 + x^13 + x^11 + 1
    if (x & 1) return ((x >> 1) ^ 16'hB400) & 16'hFFFF;
    else       return (x >> 1) & 16'hFFFF;
  endfunction

  function automatic int bram_init(int unsigned a, int unsigned salt, int unsigned init,
                                   int unsigned mask, bit rnd, int width);
    int unsigned h;
    h = (a + salt) * 32'h2C1B_3C6D;
    h = h ^ (h >> 15);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 12);
    return rnd ? int'((init + (h & mask)) & ((1 << width) - 1)) : int'(init & ((1 << width) - 1));
  endfunction

  // exp(-d/tau) in Q8.8 by the Q0.24 recurrence (r = round(exp(-1/tau)*2^24))
  function automatic int exp_entry(longint unsigned r, int d);
    longint unsigned x;
    x = 64'd1 << 24;
    for (int i = 0; i < d; i++) x = (x * r) >> 24;
    return int'((x + (64'd1 << 15)) >> 16);
  endfunction

  function automatic int sat(int x, int lo, int hi);
    return (x < lo) ? lo : ((x > hi) ? hi : x);
  endfunction

  // ---------------- whole-network reference ----------------
  class snn_model;
    int n_in, n_out, k, v_th, v_rest, v_leak, k_syn, kext_min;
    bit approx;
    int w_e2i_in = 8, w_e2i_out = 1024, w_i2e_out = -2048, w_i2e_in0 = -4;
    int off1 = 4, off2 = -3, off3 = -2;
    int lut_depth = 256;
    longint unsigned r1 = 15760736, r2 = 16261035;
    int vmem[], tfire[], w[], ap[], am[], lfsr[];
    bit s[];
    int v_inh_in[6], v_inh_out;
    bit s_inh_in[6], s_inh_out;
    int t;
    int e1[], e2[];
    int syn_updates;
    int fired_in, fired_out, fired_inh_in, fired_inh_out, w_sat;

    function new(int n_in, int n_out, int k, bit approx, int v_th, int v_rest, int v_leak,
                 int k_syn, int kext_min, int a_plus_init, int a_minus_init);
      this.n_in = n_in; this.n_out = n_out; this.k = k; this.approx = approx;
      this.v_th = v_th; this.v_rest = v_rest; this.v_leak = v_leak;
      this.k_syn = k_syn; this.kext_min = kext_min;
      vmem = new[n_in + n_out]; tfire = new[n_in + n_out]; s = new[n_in + n_out];
      w = new[n_in * n_out]; ap = new[n_in * n_out]; am = new[n_in * n_out];
      lfsr = new[k];
      for (int l = 0; l < k; l++) lfsr[l] = (16'hACE1 ^ ((l * 16'h3B5) & 16'hFFFF));
      for (int i = 0; i < n_out; i++)
        for (int j = 0; j < n_in; j++) begin
          int g = ((n_out + k - 1) / k);
          w[i*n_in + j]  = bram_init((i / k) * n_in + j, 32'h1000 * ((i % k) + 1), 4, 7, 1, 4);
          ap[i*n_in + j] = a_plus_init;
          am[i*n_in + j] = a_minus_init;
          if (g < 0) w[0] = 0;
        end
      e1 = new[lut_depth]; e2 = new[lut_depth];
      for (int d = 0; d < lut_depth; d++) begin
        e1[d] = exp_entry(r1, d);
        e2[d] = exp_entry(r2, d);
      end
      clear();
    endfunction

    function void clear();
      foreach (vmem[n]) begin vmem[n] = v_rest; tfire[n] = 0; s[n] = 0; end
      foreach (v_inh_in[q]) begin v_inh_in[q] = v_rest; s_inh_in[q] = 0; end
      v_inh_out = v_rest; s_inh_out = 0;
      t = 256;
    endfunction

    function int satv(int x);
      return sat(x, -32768, 32767);
    endfunction

    // one biological step; e = external spikes of the input layer
    function void step(bit e[], bit train);
      int inh_in, inh_out, cnt_in, cnt_out, acc, g_in, g_out, kext;
      bit new_s[];
      t = (t + 1) & 16'hFFFF;
      inh_in = 0;
      for (int q = 0; q < 6; q++) if (s_inh_in[q]) inh_in += w_i2e_in0 * (q + 1);
      inh_in = satv(inh_in);
      inh_out = s_inh_out ? w_i2e_out : 0;
      g_in = (n_in + k - 1) / k;
      g_out = (n_out + k - 1) / k;
      // input layer
      for (int g = 0; g < g_in; g++) begin
        for (int l = 0; l < k; l++) begin
          int n = g * k + l;
          if (n < n_in) begin
            kext = e[n] ? (kext_min + (lfsr[l] & 255)) : 0;
            vmem[n] = satv(vmem[n] + kext + inh_in - v_leak);
          end
        end
        for (int l = 0; l < k; l++) lfsr[l] = lfsr_next(lfsr[l]);
      end
      // output layer
      for (int i = 0; i < n_out; i++) begin
        acc = 0;
        for (int j = 0; j < n_in; j++) if (s[j]) acc += w[i*n_in + j];
        vmem[n_in + i] = satv(vmem[n_in + i] + ref_mult(approx, k_syn, acc) + inh_out - v_leak);
      end
      for (int g = 0; g < g_out; g++)
        for (int l = 0; l < k; l++) lfsr[l] = lfsr_next(lfsr[l]);
      // inhibitory neurons (previous flags)
      cnt_in = 0; cnt_out = 0;
      for (int j = 0; j < n_in; j++) cnt_in += s[j];
      for (int i = 0; i < n_out; i++) cnt_out += s[n_in + i];
      for (int q = 0; q < 6; q++) v_inh_in[q] = satv(v_inh_in[q] + w_e2i_in * cnt_in - v_leak);
      v_inh_out = satv(v_inh_out + w_e2i_out * cnt_out - v_leak);
      // fire check
      foreach (vmem[n]) begin
        if (vmem[n] >= v_th) begin
          s[n] = 1; tfire[n] = t; vmem[n] = v_rest;
          if (n < n_in) fired_in++; else fired_out++;
        end else s[n] = 0;
      end
      for (int q = 0; q < 6; q++) begin
        s_inh_in[q] = (v_inh_in[q] >= v_th);
        if (s_inh_in[q]) begin v_inh_in[q] = v_rest; fired_inh_in++; end
      end
      s_inh_out = (v_inh_out >= v_th);
      if (s_inh_out) begin v_inh_out = v_rest; fired_inh_out++; end
      // learning
      if (train) begin
        for (int i = 0; i < n_out; i++) begin
          if (s[n_in + i]) begin
            for (int j = 0; j < n_in; j++) begin
              int dt, idx, a1, a2, dw, wn;
              dt = (t - tfire[j]) & 16'hFFFF;
              idx = (dt >= lut_depth - 1) ? lut_depth - 1 : dt;
              a1 = sat(ref_mult(approx, ap[i*n_in+j] * 256, e1[idx]) + off1, -128, 127);
              a2 = sat(ref_mult(approx, am[i*n_in+j] * 256, e2[idx]) + off2, -128, 127);
              dw = a1 + a2 + off3;
              wn = (w[i*n_in+j] * 16 + dw + 8) >>> 4;
              if (wn <= 0 || wn >= 15) w_sat++;
              w[i*n_in+j]  = sat(wn, 0, 15);
              ap[i*n_in+j] = a1;
              am[i*n_in+j] = a2;
              syn_updates++;
            end
          end
        end
      end
    endfunction
  endclass

endpackage
