// sn_e2e_scenario.svh: end-to-end scenario shared by the spiking-neuron
// testbenches. The including module declares localparam N (synapses), the
// DUT signals and the DUT instance named dut. The scenario configures the
// neuron through its memory write port, runs pulse cycles with random axon
// spikes (also while the neuron is busy) and random extra pulse_ticks, and
// checks every pulse cycle against sn_ref_pkg::sn_ref_model: the spike
// decision, the membrane potential, the leak and saturation indications and
// the latency from pulse_tick to done. It counts each mechanism and fails if
// one never happened: firing under each activation function, applied and
// skipped leaks, saturation, V0 loads, spikes held over to the next pulse
// cycle, ignored pulse_ticks, and (for N < 7) the wait for the random
// number generator.

  sn_ref_model m;
  int checks = 0, failures = 0;
  int n_fire [4];
  int n_pulse [4];
  int n_leak = 0, n_noleak = 0, n_sat = 0, n_stall = 0, n_ignored = 0;
  int n_held = 0, n_v0 = 0;
  logic [N-1:0] pend = '0;
  int density = 30;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [N-1:0] rand_spikes(input int pct);
    logic [N-1:0] s;
    for (int i = 0; i < N; i++) s[i] = ($urandom_range(0, 99) < pct);
    return s;
  endfunction

  // one write on the configuration port; the model is updated by the caller
  task automatic cfg(input int addr, input int data);
    @(negedge clk);
    spike_in = '0;
    cfg_we = 1'b1;
    cfg_addr = AW'(addr);
    cfg_wdata = CFG_W'(data);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic set_weight(input int i, input int wv, input bit c = 1'b1);
    cfg(i, (int'(c) << SYN_CON_BIT) | (wv & 'hFF));
    m.w[i] = wv;
    m.con[i] = c;
  endtask

  task automatic set_params(input int af, lf, lp, lt, bias, v0);
    cfg(N + PAR_AF, af);     m.af = af;
    cfg(N + PAR_LF, lf);     m.lf = lf;
    cfg(N + PAR_LP, lp);     m.lp = lp;
    cfg(N + PAR_LT, lt);     m.lt = lt;
    cfg(N + PAR_BIAS, bias); m.bias = bias;
    cfg(N + PAR_V0, v0);     m.v0 = v0;
  endtask

  task automatic do_load_v0();
    @(negedge clk);
    spike_in = '0;
    load_v0 = 1'b1;
    @(negedge clk);
    load_v0 = 1'b0;
    m.load_v0();
    n_v0++;
    chk(longint'(membrane) == m.y, "membrane after load_v0");
  endtask

  task automatic run_pulse();
    logic [N-1:0] snap;
    bit exp_fire, leak_seen, sat_seen, stall_seen;
    int t, lat;
    repeat ($urandom_range(0, 2)) begin
      @(negedge clk);
      spike_in = rand_spikes(density / 2);
      pend |= spike_in;
    end
    @(negedge clk);
    spike_in = rand_spikes(density);
    pulse_tick = 1'b1;
    snap = pend | spike_in;
    pend = '0;
    exp_fire = m.step(64'(snap));
    t = 0;
    leak_seen = 0; sat_seen = 0; stall_seen = 0;
    forever begin
      @(negedge clk);
      t++;
      if (leak_event) leak_seen = 1;
      if (sat_event) sat_seen = 1;
      if (stall) begin
        stall_seen = 1;
        n_stall++;
      end
      chk(!spike_out || done, "spike_out only with done");
      spike_in = rand_spikes(density / 2);
      pend |= spike_in;
      pulse_tick = 1'b0;
      if (!done && busy && spike_in != '0) n_held++;
      if (!done && busy && $urandom_range(0, 9) == 0) begin
        pulse_tick = 1'b1;  // must be ignored
        n_ignored++;
      end
      if (done || t > 200) break;
    end
    lat = (N + 3 > 10) ? N + 3 : 10;
    chk(done && t == lat, $sformatf("latency %0d clocks, expected %0d", t, lat));
    chk(spike_out == exp_fire, $sformatf("spike_out=%0d expected %0d (Y=%0d)", spike_out, exp_fire, m.y));
    chk(longint'(membrane) == m.y, $sformatf("membrane=%0d expected %0d", membrane, m.y));
    chk(leak_seen == m.leak, "leak_event");
    chk(sat_seen == m.sat, "sat_event");
    chk(stall_seen == (N < 7), "stall only when the RNG is slower than the iteration");
    n_pulse[m.af]++;
    if (spike_out) n_fire[m.af]++;
    if (m.leak) n_leak++; else n_noleak++;
    if (m.sat) n_sat++;
  endtask

  initial begin
    int r;
    m = new(N, YW, SEED);
    foreach (n_fire[k]) begin
      n_fire[k] = 0;
      n_pulse[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Identity: Y grows with positive-leaning weights; bias shifts it up
    for (int i = 0; i < N; i++) set_weight(i, $urandom_range(0, 120) - 40);
    set_params(0, 4, 0, 0, 20000, -500);
    do_load_v0();
    density = 30;
    repeat (60) run_pulse();
    // Binary with a leak every third pulse cycle, first leak after LT+1
    set_params(1, 2, 2, 1, -50, 0);
    do_load_v0();
    for (int i = 0; i < N; i++) set_weight(i, $urandom_range(0, 60) - 30);
    repeat (60) run_pulse();
    // Sigmoid around zero
    for (int i = 0; i < N; i++) set_weight(i, $urandom_range(0, 40) - 20);
    set_params(2, 5, 1, 0, 0, 0);
    do_load_v0();
    repeat (80) run_pulse();
    // Saturation, positive then negative, with a slow leak
    for (int i = 0; i < N; i++) set_weight(i, 127);
    set_params(0, 7, 255, 255, 0, 30000);
    do_load_v0();
    density = 100;
    repeat (80) run_pulse();
    for (int i = 0; i < N; i++) set_weight(i, -128);
    repeat (120) run_pulse();
    // Reserved activation code: never fires
    for (int i = 0; i < N; i++) set_weight(i, $urandom_range(0, 100));
    set_params(3, 3, 0, 0, 1000, 20000);
    do_load_v0();
    density = 40;
    repeat (20) run_pulse();
    // Random configurations
    for (int k = 0; k < 10; k++) begin
      for (int i = 0; i < N; i++) set_weight(i, $urandom_range(0, 255) - 128, 1'($urandom_range(0, 3) != 0));
      set_params($urandom_range(0, 2), $urandom_range(0, 7), $urandom_range(0, 3),
                 $urandom_range(0, 3), $urandom_range(0, 4000) - 2000, $urandom_range(0, 4000) - 2000);
      do_load_v0();
      density = $urandom_range(5, 80);
      repeat (20) run_pulse();
    end
    // mechanisms
    for (int k = 0; k < 3; k++)
      chk(n_fire[k] > 0 && n_fire[k] < n_pulse[k], $sformatf("activation %0d fired %0d of %0d", k, n_fire[k], n_pulse[k]));
    chk(n_pulse[3] > 0 && n_fire[3] == 0, "reserved activation silent");
    chk(n_leak > 0, "leak applied");
    chk(n_noleak > 0, "leak skipped (LP > 0)");
    chk(n_sat > 0, "saturation");
    chk(n_v0 > 0, "V0 load");
    chk(n_held > 0, "spikes held over while busy");
    chk(n_ignored > 0, "pulse_tick ignored while busy");
    if (N < 7) chk(n_stall > 0, "wait for random numbers");
    $display("fires identity %0d/%0d binary %0d/%0d sigmoid %0d/%0d reserved %0d/%0d",
             n_fire[0], n_pulse[0], n_fire[1], n_pulse[1], n_fire[2], n_pulse[2], n_fire[3], n_pulse[3]);
    $display("leaks %0d skipped %0d saturations %0d V0 loads %0d held spikes %0d ignored ticks %0d stall clocks %0d",
             n_leak, n_noleak, n_sat, n_v0, n_held, n_ignored, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
