// tb_picotdc_body.svh: stimulus and checks of the end-to-end test, shared by
// tb_picotdc_top (64 phases per clock period) and tb_picotdc_full (default
// size, 256 phases). The including module defines NPH_TB and instantiates
// the design as `dut`.

  localparam real T  = 781.25;
  localparam real TB = T / 256.0;   // one unit of the 26-bit time
  localparam int  SC = 256 / NPH_TB; // time units per phase step
  localparam real Q  = T * 8;          // I2C quarter bit

  int checks = 0, failures = 0;
  logic clk = 0, rst, trigger, event_rst, bx_rst, scl, sda_m, sda_oe;
  logic [63:0] hit;
  logic [7:0] port_data [4];
  logic [3:0] port_byte_en, port_frame_start;
  wire sda = sda_m & ~sda_oe;


  always #(T / 2) clk = ~clk;

  // ---- port decoding ----
  logic [31:0] rx [4][$];
  logic [31:0] sh [4];
  int          nb [4];
  int          nbytes0;
  always @(posedge clk) for (int p = 0; p < 4; p++) if (!rst && port_byte_en[p]) begin
    if (port_frame_start[p]) nb[p] = 0;
    sh[p] = {sh[p][23:0], port_data[p]};
    nb[p]++;
    if (p == 0) nbytes0++;
    if (nb[p] == 4 && sh[p] != IDLE_FRAME) rx[p].push_back(sh[p]);
  end
  task automatic clear_rx(); for (int p = 0; p < 4; p++) rx[p].delete(); endtask

  // ---- I2C master ----
  task automatic i2c_start(); sda_m = 1; #Q scl = 1; #Q sda_m = 0; #Q scl = 0; #Q; endtask
  task automatic i2c_stop();  sda_m = 0; #Q scl = 1; #Q sda_m = 1; #(2*Q); endtask
  task automatic i2c_wbyte(logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin sda_m = b[i]; #Q scl = 1; #(2*Q) scl = 0; #Q; end
    sda_m = 1; #Q scl = 1; #Q `CHECK(!sda, "I2C ACK") #Q scl = 0; #Q;
  endtask
  task automatic i2c_rbyte(logic ack, output logic [7:0] b);
    sda_m = 1;
    for (int i = 7; i >= 0; i--) begin #Q scl = 1; #Q b[i] = sda; #Q scl = 0; #Q; end
    sda_m = !ack; #Q scl = 1; #(2*Q) scl = 0; #Q; sda_m = 1;
  endtask
  task automatic cfg_write(logic [15:0] a, logic [7:0] d[$]);
    i2c_start(); i2c_wbyte({7'h5A, 1'b0}); i2c_wbyte(a[15:8]); i2c_wbyte(a[7:0]);
    foreach (d[i]) i2c_wbyte(d[i]);
    i2c_stop();
  endtask
  task automatic cfg_read(logic [15:0] a, output logic [7:0] b);
    i2c_start(); i2c_wbyte({7'h5A, 1'b0}); i2c_wbyte(a[15:8]); i2c_wbyte(a[7:0]);
    i2c_start(); i2c_wbyte({7'h5A, 1'b1}); i2c_rbyte(0, b); i2c_stop();
  endtask

  // ---- hits ----
  typedef struct { int c; realtime at; realtime w; } pulse_t;
  pulse_t pulses[$];
  task automatic pulse(int c, realtime at, realtime w);
    pulses.push_back('{c, at, w});
    fork
      begin
        #(at - $realtime) hit[c] = 1'b1;
        #(w) hit[c] = 1'b0;
      end
    join_none
  endtask

  // signed difference of two 26-bit times
  function automatic int sdiff(tdc_time_t a, tdc_time_t b);
    logic [TIME_W-1:0] d = a - b;
    return (d[TIME_W-1]) ? int'(d) - (1 << TIME_W) : int'(d);
  endfunction
  function automatic tdc_time_t true_bins(realtime at);
    return tdc_time_t'(longint'(at / TB));
  endfunction

  // mechanism counters
  int n_untrig, n_glitch, n_coarse, n_trig, n_overlap, n_rel, n_sep, n_tot, n_ch0trig,
      n_pulsegen, n_ovf, n_rate, n_hdr2;
  int  off_ref;
  logic off_set;

  // check one absolute time against the true time of an edge
  task automatic check_abs(tdc_time_t meas, realtime at, int tol, string what);
    int off = sdiff(meas, true_bins(at));
    if (!off_set) begin off_ref = off; off_set = 1; end
    `CHECK(off - off_ref <= tol && off_ref - off <= tol, what)
  endtask

  // find the data words of channel c (port from the channel group) in rx
  task automatic words_of(int c, output logic [31:0] w[$]);
    w.delete();
    foreach (rx[c / 16][i]) if (rx[c / 16][i][31] == 1'b0 && rx[c / 16][i][30:27] == 4'(c % 16))
      w.push_back(rx[c / 16][i]);
  endtask

  realtime base;
  logic [7:0] b;
  logic [31:0] w[$];

  initial begin
    rst = 1; trigger = 0; event_rst = 0; bx_rst = 0; scl = 1; sda_m = 1; hit = '0;
    off_set = 0; nbytes0 = 0;
    for (int p = 0; p < 4; p++) begin nb[p] = 0; sh[p] = '0; end
    repeat (10) @(posedge clk);
    rst = 0;
    repeat (10) @(posedge clk);

    // ===== 1. untriggered, leading + trailing, 3 ps bins, four ports =====
    pulses.delete(); clear_rx();
    base = $realtime + 100 * T;
    for (int c = 0; c < 64; c++)
      pulse(c, base + c * 23.1 * T + $urandom_range(0, 9999) * T / 10000.0,
            (6 + $urandom_range(0, 20)) * T + $urandom_range(0, 999) * TB / 4);
    #(64 * 23.1 * T + 300 * T);
    foreach (pulses[k]) begin
      words_of(pulses[k].c, w);
      `CHECK(w.size() == 2, "untriggered: two edges per pulse")
      if (w.size() == 2) begin
        `CHECK(w[0][26] == 1'b0 && w[1][26] == 1'b1, "edge types")
        check_abs(w[0][25:0], pulses[k].at, 2 * SC, "untriggered leading time");
        check_abs(w[1][25:0], pulses[k].at + pulses[k].w, 2 * SC, "untriggered trailing time");
        n_untrig++;
      end
    end

    // ===== 2. glitch filter (code 0: 781 ps) removes a 500 ps pulse =====
    clear_rx();
    pulse(5, $realtime + 20 * T, 500);
    pulse(6, $realtime + 20 * T, 1200);
    #(200 * T);
    words_of(5, w); `CHECK(w.size() == 0, "glitch removed")
    if (w.size() == 0) n_glitch++;
    words_of(6, w); `CHECK(w.size() == 2, "1.2 ns pulse kept")

    // ===== 3. 12 ps bins =====
    cfg_write(16'd0, '{8'b0011_0000});
    clear_rx(); pulses.delete();
    for (int c = 8; c < 40; c += 3)
      pulse(c, $realtime + 20 * T + c * 11.3 * T + $urandom_range(0, 999) * T / 1000.0, 9.37 * T);
    #(800 * T);
    foreach (pulses[k]) begin
      words_of(pulses[k].c, w);
      `CHECK(w.size() == 2, "coarse: two edges")
      if (w.size() == 2) begin
        `CHECK(w[0][1:0] == 2'b00 && w[1][1:0] == 2'b00, "coarse: no interpolation bits")
        check_abs(w[0][25:0], pulses[k].at, 6 * SC, "coarse leading time");
        n_coarse++;
      end
    end

    // ===== 4. triggered, two headers, relative time, overlapping windows =====
    // latency 200, window 80 cycles
    cfg_write(16'd0, '{8'b0101_0011, 8'h01, 8'h00, 8'd200, 8'd0, 8'd0, 8'd80, 8'd0, 8'd0});
    clear_rx(); pulses.delete();
    begin
      automatic realtime tt[$];
      automatic int exp_n [5][64];
      automatic int ev_of [5];
      @(negedge clk);
      base = $realtime + 400 * T;
      // trigger k at base + k*400T, extra trigger 30T after trigger 1
      tt = '{base, base + 400 * T, base + 430 * T, base + 800 * T, base + 1200 * T};
      for (int e = 0; e < 5; e++) for (int c = 0; c < 64; c++) exp_n[e][c] = 0;
      foreach (tt[e]) if (e != 2) begin
        for (int c = 0; c < 64; c++) if ($urandom_range(1) == 1) begin
          automatic int jit = $urandom_range(0, 160);
          pulse(c, tt[e] - 150 * T + (jit - 80) * T / 10, 3 * T);
          exp_n[e][c]++;
          if (e == 1) exp_n[2][c]++;          // also inside the overlapping window
          pulse(c, tt[e] - 260 * T, 2 * T);   // outside every window
        end
      end
      foreach (tt[e]) fork
        automatic realtime at = tt[e];
        begin #(at - $realtime) trigger = 1; #(2 * T) trigger = 0; end
      join_none
      #(tt[4] - $realtime + 600 * T);
      // parse each port
      for (int p = 0; p < 4; p++) begin
        automatic int e = -1, nd = 0;
        automatic int got_n [5][16];
        for (int x = 0; x < 5; x++) for (int c = 0; c < 16; c++) got_n[x][c] = 0;
        foreach (rx[p][i]) begin
          automatic logic [31:0] f = rx[p][i];
          case (f[31:28])
            T_HEADER1: begin e++; nd = 0; `CHECK(f[27:12] == 16'(e), "event ID in header 1") end
            T_HEADER2: n_hdr2++;
            T_TRAILER: `CHECK(f[15:0] == 16'(nd), "trailer frame count")
            default: if (!f[31] && e >= 0 && e < 5) begin
              automatic int c = 16 * p + int'(f[30:27]);
              automatic realtime s = tt[e] - 200 * T;
              nd++;
              got_n[e][f[30:27]]++;
              // relative time: from the window start, small fixed offset allowed
              begin
                automatic int rel = int'(f[25:0]);
                automatic int expv = 0;
                foreach (pulses[k]) if (pulses[k].c == c && pulses[k].at > s && pulses[k].at < s + 80 * T)
                  expv = int'((pulses[k].at - s) / TB);
                `CHECK(rel - expv > -4 * 256 && rel - expv < 4 * 256, "relative time")
                n_rel++;
              end
            end
          endcase
        end
        `CHECK(e == 4, "five events on every port")
        for (int x = 0; x < 5; x++) for (int c = 0; c < 16; c++)
          begin
            `CHECK(got_n[x][c] == exp_n[x][16 * p + c], "hits matched per event and channel")
          end
      end
      n_trig += 5;
      n_overlap++;
    end

    // ===== 5. single port, leading + TOT, channel 0 triggers =====
    // triggered | relative | tot_mode | fine | single_port ; trig_ch0 ; latency 40, window 60
    cfg_write(16'd0, '{8'b1100_0111, 8'h02, 8'h00, 8'd40, 8'd0, 8'd0, 8'd60, 8'd0, 8'd0});
    clear_rx(); pulses.delete();
    begin
      automatic int nexp = 0, ndata = 0, nsep = 0, grp = -1;
      @(negedge clk);
      base = $realtime + 200 * T;
      for (int e = 0; e < 3; e++) begin
        pulse(0, base + e * 300 * T + 0.3 * T, 4 * T);          // trigger
        for (int c = 1; c < 64; c += 9) begin
          pulse(c, base + e * 300 * T - 10 * T + c * TB * 7, (2 + c % 5) * T + 17 * TB);
          nexp++;
        end
      end
      #(1900 * T);
      foreach (rx[0][i]) begin
        automatic logic [31:0] f = rx[0][i];
        if (f[31:28] == T_SEPARATOR) begin grp = int'(f[1:0]); nsep++; end
        else if (!f[31]) begin
          automatic int c = 16 * grp + int'(f[30:27]);
          automatic int totv = int'(f[10:0]);
          foreach (pulses[k]) if (pulses[k].c == c && c != 0) begin
            if (totv > int'(pulses[k].w / TB) - 3 * SC && totv < int'(pulses[k].w / TB) + 3 * SC) begin
              ndata++;
              break;
            end
          end
        end
      end
      `CHECK(nsep == 12, "four group separators per event")
      `CHECK(ndata == nexp, "TOT frames with the pulse widths")
      `CHECK(rx[1].size() == 0 && rx[2].size() == 0 && rx[3].size() == 0, "other ports idle")
      n_sep += nsep; n_tot += ndata; n_ch0trig += (nsep / 4);
    end

    // ===== 6. pulse generator on channel 3, untriggered format A =====
    // lead_en | trail_en | fine ; pulse generator: period 40, width 12 cycles
    cfg_write(16'd0, '{8'b0111_0000, 8'h00, 8'h40});
    cfg_write(16'd11, '{8'd40, 8'd0, 8'd12, 8'd0});
    cfg_write(16'd24, '{8'h08});
    clear_rx();
    #(400 * T);
    cfg_write(16'd2, '{8'h00});
    #(100 * T);
    words_of(3, w);
    `CHECK(w.size() >= 8, "pulse generator hits")
    for (int i = 2; i + 2 < w.size(); i += 2) begin
      `CHECK(w[i][26] == 1'b0 && sdiff(w[i][25:0], w[i-2][25:0]) == 40 * 256, "pulse period")
      `CHECK(sdiff(w[i+1][25:0], w[i][25:0]) == 12 * 256, "pulse width")
      n_pulsegen++;
    end
    cfg_write(16'd24, '{8'h00});

    // ===== 7. derandomizer overflow: edges every 2 cycles on channel 7 =====
    clear_rx();
    cfg_read(16'h0402, b);
    `CHECK(b[7] == 1'b0, "no overflow flag before the burst")
    for (int i = 0; i < 24; i++) pulse(7, $realtime + 20 * T + i * 4 * T, 2 * T);
    #(200 * T);
    words_of(7, w);
    `CHECK(w.size() < 48, "burst edges lost")
    cfg_read(16'h0402, b);
    `CHECK(b[7] == 1'b1, "overflow flag in status")
    if (b[7]) n_ovf++;

    // ===== 8. byte rate 40 MHz (320 >> 3) on the ports =====
    cfg_write(16'd1, '{8'h0C});
    #(20 * T);
    nbytes0 = 0;
    #(800 * T);
    `CHECK(nbytes0 >= 24 && nbytes0 <= 26, "port byte rate 40 MHz")
    if (nbytes0 >= 24 && nbytes0 <= 26) n_rate++;

    $display("mechanisms: untrig=%0d glitch=%0d coarse=%0d trig=%0d overlap=%0d hdr2=%0d rel=%0d sep=%0d tot=%0d ch0trig=%0d pulsegen=%0d ovf=%0d rate=%0d",
             n_untrig, n_glitch, n_coarse, n_trig, n_overlap, n_hdr2, n_rel, n_sep, n_tot,
             n_ch0trig, n_pulsegen, n_ovf, n_rate);
    `CHECK(n_untrig > 0, "mechanism: untriggered readout")
    `CHECK(n_glitch > 0, "mechanism: glitch filter")
    `CHECK(n_coarse > 0, "mechanism: 12 ps bins")
    `CHECK(n_trig > 0 && n_overlap > 0 && n_hdr2 > 0 && n_rel > 0, "mechanism: trigger matching")
    `CHECK(n_sep > 0 && n_tot > 0 && n_ch0trig > 0, "mechanism: single port, TOT, channel 0 trigger")
    `CHECK(n_pulsegen > 0, "mechanism: pulse generator")
    `CHECK(n_ovf > 0, "mechanism: derandomizer overflow")
    `CHECK(n_rate > 0, "mechanism: port byte rate")
    `FINISH
  end
  initial begin #(T * 200000); failures++; $display("watchdog"); `FINISH end
