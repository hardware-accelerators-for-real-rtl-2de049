// tb_fir_filter: random coefficients and samples through the FIR datapath
// with random source gaps and sink back-pressure; every output is compared
// with a direct convolution over the sample history (32-bit wrap). Also
// checks one sample per clock when neither side stalls, and that clear_i
// restarts the filter from rest.
module tb_fir_filter;
  localparam int NTAPS = 11;
  localparam int NS    = 400;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        enable = 1'b0, clear = 1'b0;
  logic signed [31:0] coef [NTAPS];
  logic [31:0] s_tdata = '0, m_tdata;
  logic        s_tvalid = 1'b0, s_tready, s_tlast = 1'b0;
  logic        m_tvalid, m_tready = 1'b0, m_tlast;

  fir_filter #(.NTAPS(NTAPS), .DATA_W(32)) dut (
    .clk, .rst_n, .enable_i(enable), .clear_i(clear), .coef_i(coef),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast)
  );

  int x [NS];
  int y [NS];
  int n_in, n_out;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference: y[n] = sum b[k] x[n-k], 32-bit wrap, zero history before n=0
  task automatic make_ref();
    for (int n = 0; n < NS; n++) begin
      int acc = 0;
      for (int k = 0; k < NTAPS; k++) if (n - k >= 0) acc = acc + coef[k] * x[n-k];
      y[n] = acc;
    end
  endtask

  // run one packet; pv/pr are the percent chances of valid/ready per cycle
  task automatic run_packet(int pv, int pr, output int cycles);
    int t0;
    n_in = 0; n_out = 0;
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    t0 = $time;
    fork
      begin
      while (n_in < NS) begin
        s_tvalid = ($urandom_range(99) < pv);
        s_tdata  = x[n_in];
        s_tlast  = (n_in == NS-1);
        #1;
        if (s_tvalid && s_tready) n_in++;
        @(negedge clk);
      end
      s_tvalid = 1'b0;
      end
      while (n_out < NS) begin
        m_tready = ($urandom_range(99) < pr);
        #1;
        if (m_tvalid && m_tready) begin
          check($sformatf("y[%0d]", n_out), 64'(signed'(m_tdata)), 64'(y[n_out]));
          check("tlast", 64'(m_tlast), 64'(n_out == NS-1));
          n_out++;
        end
        @(negedge clk);
      end
    join
    s_tvalid = 1'b0; m_tready = 1'b0;
    cycles = ($time - t0) / 10;
  endtask

  int cyc;

  initial begin
    for (int k = 0; k < NTAPS; k++) coef[k] = $urandom_range(200) - 100;
    for (int n = 0; n < NS; n++) x[n] = $urandom;
    make_ref();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    // no stalls: one sample per clock
    run_packet(100, 100, cyc);
    check("cycles for a packet without stalls", cyc, NS + 1);
    // random stalls on both sides, new data
    for (int n = 0; n < NS; n++) x[n] = $urandom;
    make_ref();
    run_packet(60, 50, cyc);
    // impulse response equals the coefficient list
    for (int n = 0; n < NS; n++) x[n] = (n == 0) ? 1 : 0;
    make_ref();
    run_packet(80, 80, cyc);
    for (int k = 0; k < NTAPS; k++) check("impulse reference", y[k], coef[k]);
    // disabled: nothing accepted
    enable = 1'b0; s_tvalid = 1'b1;
    #1 check("held off while disabled", 64'(s_tready), 0);
    s_tvalid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
