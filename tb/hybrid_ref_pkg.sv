// Reference models for the hybrid LUT/MUX4 testbenches.
//
// The functions give the expected output of each logic element straight
// from its definition (a MUX4 output is d[s] xor inv[s], a LUT output is its
// truth-table entry), without the gate structure of the RTL.  ClbModel holds
// a configuration image of a whole CLB, draws random images whose
// unregistered feedback is acyclic, and evaluates the block cycle by cycle.
// Configuration layout (LSB first): crossbar select fields, pin p =
// BLE p/PINS input p%PINS, then BLEs 0..N_BLE-1, MUX4 kinds first.
package hybrid_ref_pkg;

  function automatic bit ref_mux4(bit [5:0] in, bit [3:0] inv);
    int s = int'(in[5:4]);
    return in[s] ^ inv[s];
  endfunction

  function automatic bit ref_lut(bit [5:0] in, bit [63:0] t);
    return t[in];
  endfunction

  function automatic bit [1:0] ref_dual_mux4(bit [7:0] in, bit [7:0] inv);
    int s = int'(in[7:6]);
    bit [3:0] da = in[3:0];
    bit [3:0] db = in[5:2];
    return {db[s] ^ inv[4+s], da[s] ^ inv[s]};
  endfunction

  function automatic bit [1:0] ref_frac_lut(bit [7:0] in, bit [63:0] t, bit frac);
    if (frac) return {t[32 + int'({in[7:5], in[1:0]})], t[int'(in[4:0])]};
    else      return {t[32 + int'(in[4:0])], t[int'(in[5:0])]};
  endfunction

  class ClbModel;
    bit frac;
    int n_in, n_ble, n_mux4, pins, nout, n_src, n_opt, sel_w, xbar_w, cfg_w;
    bit img[];            // configuration image, index = chain bit
    bit q[];              // flip-flop state, index = BLE*nout + output
    bit le_val[];         // LE outputs of the last evaluation
    bit reg_use[];
    int src_of_pin[];
    // coverage
    int n_fb_pins, n_reg_outs, n_frac_mode, n_lut6_mode;

    function new(bit frac_i, int n_in_i, int n_ble_i, int n_mux4_i);
      frac = frac_i; n_in = n_in_i; n_ble = n_ble_i; n_mux4 = n_mux4_i;
      pins  = frac ? 8 : 6;
      nout  = frac ? 2 : 1;
      n_src = n_in + nout * n_ble;
      n_opt = (n_src + 1) / 2;
      sel_w = 1;
      while ((1 << sel_w) < n_opt) sel_w++;
      xbar_w = n_ble * pins * sel_w;
      cfg_w  = xbar_w;
      for (int i = 0; i < n_ble; i++) cfg_w += ble_w(i);
      img = new[cfg_w];
      q = new[n_ble * nout];
      le_val = new[n_ble * nout];
      reg_use = new[n_ble * nout];
      src_of_pin = new[n_ble * pins];
      foreach (q[i]) q[i] = 0;
    endfunction

    function int ble_w(int i);
      if (frac) return (i < n_mux4) ? 10 : 67;
      else      return (i < n_mux4) ? 5 : 65;
    endfunction

    function int ble_off(int i);
      int o = xbar_w;
      for (int b = 0; b < i; b++) o += ble_w(b);
      return o;
    endfunction

    function void put(int off, int w, bit [63:0] v);
      for (int b = 0; b < w; b++) img[off + b] = v[b];
    endfunction

    function bit [63:0] get(int off, int w);
      bit [63:0] v = '0;
      for (int b = 0; b < w; b++) v[b] = img[off + b];
      return v;
    endfunction

    // Random image; fb_pct is the chance (percent) that a pin tries to take
    // a fed-back BLE output.  Unregistered outputs feed only later BLEs.
    function void randomize_cfg(int fb_pct);
      n_fb_pins = 0; n_reg_outs = 0; n_frac_mode = 0; n_lut6_mode = 0;
      for (int i = 0; i < n_ble; i++) begin
        int off = ble_off(i);
        int le_w = ble_w(i) - nout;
        for (int b = 0; b < ble_w(i); b++) img[off + b] = 1'($urandom);
        for (int o = 0; o < nout; o++) begin
          reg_use[i*nout + o] = img[off + le_w + o];
          if (reg_use[i*nout + o]) n_reg_outs++;
        end
        if (frac && i >= n_mux4) begin
          if (img[off + 64]) n_frac_mode++; else n_lut6_mode++;
        end
      end
      for (int p = 0; p < n_ble * pins; p++) begin
        int i = p / pins;
        int sel, src;
        if ($urandom_range(99) < fb_pct) sel = $urandom_range(n_opt - 1, n_in / 2);
        else                             sel = $urandom_range(n_in / 2 - 1, 0);
        src = sel * 2 + p % 2;
        if (src >= n_src) src = 0;
        if (src >= n_in) begin
          int fo = src - n_in;
          if (!(reg_use[fo] || fo / nout < i)) begin
            sel = $urandom_range(n_in / 2 - 1, 0);
            src = sel * 2 + p % 2;
          end
        end
        if (src >= n_in) n_fb_pins++;
        src_of_pin[p] = src;
        put(p * sel_w, sel_w, 64'(sel));
      end
    endfunction

    // Evaluate outputs for CLB inputs `in`; returns the CLB outputs.
    function bit [31:0] eval(bit [127:0] in);
      bit [31:0] out = '0;
      // registered outputs are visible to every BLE before any LE settles
      foreach (q[k]) if (reg_use[k]) out[k] = q[k];
      for (int i = 0; i < n_ble; i++) begin
        bit [7:0] bi = '0;
        bit [1:0] r;
        int off = ble_off(i);
        for (int j = 0; j < pins; j++) begin
          int s = src_of_pin[i*pins + j];
          bi[j] = (s < n_in) ? in[s] : out[s - n_in];
        end
        if (!frac) begin
          if (i < n_mux4) r[0] = ref_mux4(bi[5:0], 4'(get(off, 4)));
          else            r[0] = ref_lut(bi[5:0], get(off, 64));
          r[1] = 0;
        end else begin
          if (i < n_mux4) r = ref_dual_mux4(bi, 8'(get(off, 8)));
          else            r = ref_frac_lut(bi, get(off, 64), img[off + 64]);
        end
        for (int o = 0; o < nout; o++) begin
          le_val[i*nout + o] = r[o];
          out[i*nout + o] = reg_use[i*nout + o] ? q[i*nout + o] : r[o];
        end
      end
      return out;
    endfunction

    function void clock();
      foreach (q[k]) q[k] = le_val[k];
    endfunction
  endclass

endpackage
