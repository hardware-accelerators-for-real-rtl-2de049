// fir_filter: direct-form FIR datapath on AXI4-Stream, one sample per clock.
//
// Implements y[n] = sum_{k=0..NTAPS-1} b[k] * x[n-k] as drawn in the usual
// direct form: a delay line of NTAPS-1 z^-1 registers, one coefficient
// multiplier per tap and a chain of adders. Samples and coefficients are
// signed DATA_W-bit integers and the sum wraps modulo 2^DATA_W, as integer
// arithmetic in C does. Each accepted input sample produces one output
// sample in the output register one clock later; the output keeps TLAST of
// the sample that produced it. Back-pressure: an input is taken only when
// enable_i is high and the output register is empty or being emptied.
// clear_i zeroes the delay line (the start of a new run), so every run
// starts from a filter at rest.
// The structure follows the direct-form FIR; the tap count, widths, wrap
// arithmetic and the per-run clear are this design's choices.
module fir_filter #(
  parameter int unsigned NTAPS  = 11,
  parameter int unsigned DATA_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable_i,
  input  logic                     clear_i,
  input  logic signed [DATA_W-1:0] coef_i [NTAPS],
  input  logic [DATA_W-1:0]        s_axis_tdata,
  input  logic                     s_axis_tvalid,
  output logic                     s_axis_tready,
  input  logic                     s_axis_tlast,
  output logic [DATA_W-1:0]        m_axis_tdata,
  output logic                     m_axis_tvalid,
  input  logic                     m_axis_tready,
  output logic                     m_axis_tlast
);

  logic signed [DATA_W-1:0] dly [NTAPS];  // dly[0] unused slot is the input
  logic signed [DATA_W-1:0] taps [NTAPS];
  logic signed [DATA_W-1:0] acc;
  logic                     take;

  assign s_axis_tready = enable_i && (!m_axis_tvalid || m_axis_tready);
  assign take          = s_axis_tvalid && s_axis_tready;

  // taps[k] = x[n-k] for the sample being accepted
  always_comb begin
    taps[0] = signed'(s_axis_tdata);
    for (int k = 1; k < NTAPS; k++) taps[k] = dly[k];
  end

  // adder chain b0*x[n] + b1*x[n-1] + ... (low DATA_W bits kept)
  always_comb begin
    acc = '0;
    for (int k = 0; k < NTAPS; k++) acc = acc + DATA_W'(coef_i[k] * taps[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) dly[k] <= '0;
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tlast  <= 1'b0;
    end else begin
      if (clear_i) begin
        for (int k = 0; k < NTAPS; k++) dly[k] <= '0;
      end else if (take) begin
        for (int k = 2; k < NTAPS; k++) dly[k] <= dly[k-1];
        if (NTAPS > 1) dly[1] <= taps[0];
      end
      if (take) begin
        m_axis_tvalid <= 1'b1;
        m_axis_tdata  <= acc;
        m_axis_tlast  <= s_axis_tlast;
      end else if (m_axis_tready) begin
        m_axis_tvalid <= 1'b0;
      end
    end
  end

endmodule
