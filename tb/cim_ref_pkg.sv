// Reference model of the accelerator for the end-to-end testbenches.
//
// Holds the contents the host loads (weight SRAM, activation SRAM, weight
// shifts, calibration offsets) and computes, cycle by cycle, what the
// accelerator must produce: for every macro and column the MAC sum(a * u)
// of the stored weight codes u, the bitline drop merged over skipped cycles
// and saturated at full swing, the 5b conversion, the ReLU termination after
// 70% of the cycles, and the final value with the offset of the unsigned
// weight format, the weight shift and the calibration added back. It also
// counts the events each mechanism should see.
package cim_ref_pkg;
  localparam int FS  = 16384;            // bitline full swing, charge units
  int vth_pct = cim_pkg::SKIP_VTH_PCT;    // skip threshold, % of full swing

  logic [511:0]  wmem [1024];
  logic [1023:0] amem [768];
  logic [7:0]    shift [4][32];
  int            cal   [32];

  typedef longint res_t [32];
  res_t results [$];
  longint n_conv, n_skip, n_ovf, n_term, n_zero, n_mac, n_flush;

  function automatic int ucode(int wb, int m, int r, int c);
    return int'(wmem[wb + r][m*128 + c*4 +: 4]);
  endfunction

  function automatic void clear_stats();
    results.delete();
    n_conv = 0; n_skip = 0; n_ovf = 0; n_term = 0; n_zero = 0; n_mac = 0; n_flush = 0;
  endfunction

  function automatic void run(bit m8, int wb, int ab, int T, int G, bit skip, bit term_en,
                              bit relu, longint th);
    int u [4][64][32];
    int nout = m8 ? 16 : 32;
    longint Z = m8 ? 128 : 8;
    for (int m = 0; m < 4; m++)
      for (int r = 0; r < 64; r++)
        for (int c = 0; c < 32; c++) u[m][r][c] = ucode(wb, m, r, c);
    for (int g = 0; g < G; g++) begin
      longint acc [32];
      longint sa [4];
      bit     term [32];
      int     carry [4][32];
      res_t   res;
      bit     stop = 0;
      for (int j = 0; j < 32; j++) begin acc[j] = 0; term[j] = 0; end
      for (int m = 0; m < 4; m++) begin
        sa[m] = 0;
        for (int c = 0; c < 32; c++) carry[m][c] = 0;
      end
      for (int t = 0; t < T && !stop; t++) begin
        logic [1023:0] word = amem[ab + g*T + t];
        bit hi = m8 && (t % 2 == 0);
        bit last = (t == T - 1);
        bit all;
        // ReLU termination on the value of the cycles before this one
        if (term_en && t * 100 > 70 * T)
          for (int j = 0; j < nout; j++) begin
            longint est = acc[j] + cal[j];
            for (int m = 0; m < 4; m++) est += (longint'(m8 ? shift[m][2*j] : shift[m][j]) - Z) * sa[m];
            if (!term[j] && est < th) begin term[j] = 1; n_term++; end
          end
        for (int m = 0; m < 4; m++) begin
          int a [64];
          int s = 0;
          for (int r = 0; r < 64; r++) begin
            a[r] = int'(word[m*256 + r*4 +: 4]);
            s += a[r];
            if (a[r] == 0) n_zero++;
          end
          for (int c = 0; c < 32; c++) begin
            int j = m8 ? c / 2 : c;
            int mac = 0, drop;
            if (m8 && j >= nout) continue;
            for (int r = 0; r < 64; r++) mac += a[r] * u[m][r][c];
            if (term[j]) begin carry[m][c] = 0; continue; end
            drop = carry[m][c] + mac;
            if (drop > FS) drop = FS;
            if (last || !(skip && !m8) || drop >= FS * vth_pct / 100) begin
              longint code = (drop >> 9) > 31 ? 31 : drop >> 9;
              if (drop >= FS) n_ovf++;
              n_conv++;
              if (!m8) acc[j] += code << 9;
              else     acc[j] += ((code << ((c % 2 == 0) ? 4 : 0)) << 9) << (hi ? 4 : 0);
              carry[m][c] = 0;
            end else begin
              carry[m][c] = drop;
              n_skip++;
            end
          end
          sa[m] += longint'(s) << (hi ? 4 : 0);
        end
        n_mac++;
        // all live outputs terminated: one more cycle is already on its way,
        // after it the accumulation is closed by a flush slot
        all = 1;
        for (int j = 0; j < nout; j++) all &= term[j];
        if (all && t + 2 <= T - 1) begin
          logic [1023:0] w2 = amem[ab + g*T + t + 1];
          for (int q = 0; q < 256; q++) if (w2[q*4 +: 4] == 0) n_zero++;
          n_mac++;
          n_flush++;
          stop = 1;
        end
      end
      for (int j = 0; j < 32; j++) begin
        longint v = acc[j] + cal[j];
        for (int m = 0; m < 4; m++) v += (longint'(m8 ? shift[m][2*j] : shift[m][j]) - Z) * sa[m];
        if (j >= nout || term[j] || (relu && v < 0)) v = 0;
        res[j] = v;
      end
      results.push_back(res);
    end
  endfunction
endpackage
