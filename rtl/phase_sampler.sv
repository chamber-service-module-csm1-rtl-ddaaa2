// phase_sampler: picks the best of four clock phases for one TDC serial input.
//
// Each TDC sends its data with its own 40 MHz strobe. The strobe has the same
// frequency as the local clock but an unknown phase, set among other things by
// the cable length. As in the specification, the strobe and the data are
// sampled on four phases of the local clock (0, 90, 180 and 270 degrees, from
// the DCM) and the stream is read on the phase that suits it best.
//
// How it works (this design's choice; the specification does not say how the
// best phase is found): the four strobe samples and four data samples are
// retimed into the clk0 domain at every clk0 edge, giving, in time order,
// s[0..3] and d[0..3] from the preceding clock period. The quarter in which
// the strobe rose is found by comparing each sample with the one before it.
// The TDC is taken to change its data on the strobe's falling edge, so the
// data is most stable near the rising edge and the chosen phase is the first
// one after it. A new phase is adopted only after the edge has been found in
// the same quarter for LOCK_CYCLES consecutive cycles, which filters jitter.
//
// Timing: one bit per clk0 cycle on bit_o, valid when bit_valid is high
// (from the first lock on). Latency from the sampling edge to bit_o is one or
// two clk0 cycles, depending on the phase.
module phase_sampler #(
  parameter int unsigned LOCK_CYCLES = 8
) (
  input  logic       clk0,
  input  logic       clk90,
  input  logic       clk180,
  input  logic       clk270,
  input  logic       rst_n,
  input  logic       strobe,
  input  logic       sdata,
  output logic       bit_o,
  output logic       bit_valid,
  output logic [1:0] phase_o,
  output logic       locked
);
  // First-stage samples, one register pair per phase clock.
  logic s_p0, s_p90, s_p180, s_p270;
  logic d_p0, d_p90, d_p180, d_p270;

  always_ff @(posedge clk0)   {s_p0,   d_p0}   <= {strobe, sdata};
  always_ff @(posedge clk90)  {s_p90,  d_p90}  <= {strobe, sdata};
  always_ff @(posedge clk180) {s_p180, d_p180} <= {strobe, sdata};
  always_ff @(posedge clk270) {s_p270, d_p270} <= {strobe, sdata};

  // Retimed into clk0: index 0 is the oldest sample of the period.
  logic [3:0] s_q, d_q;
  logic       s_last;  // newest strobe sample of the period before

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      s_q    <= '0;
      d_q    <= '0;
      s_last <= 1'b0;
    end else begin
      s_q    <= {s_p270, s_p180, s_p90, s_p0};
      d_q    <= {d_p270, d_p180, d_p90, d_p0};
      s_last <= s_q[3];
    end
  end

  // Rising edge of the strobe: low in the sample before, high in this one.
  logic [3:0] rise;
  logic       found;
  logic [1:0] edge_q;

  always_comb begin
    rise[0] = s_q[0] & ~s_last;
    for (int i = 1; i < 4; i++) rise[i] = s_q[i] & ~s_q[i-1];
    found  = 1'b0;
    edge_q = '0;
    for (int i = 0; i < 4; i++) begin
      if (rise[i] && !found) begin
        found  = 1'b1;
        edge_q = 2'(i);
      end
    end
  end

  localparam int unsigned CW = $clog2(LOCK_CYCLES + 1);
  logic [1:0]    cand;
  logic [CW-1:0] stable;

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      cand    <= '0;
      stable  <= '0;
      phase_o <= '0;
      locked  <= 1'b0;
    end else if (found) begin
      if (edge_q != cand) begin
        cand   <= edge_q;
        stable <= CW'(1);
      end else if (stable < CW'(LOCK_CYCLES)) begin
        stable <= stable + CW'(1);
      end else if (!locked || phase_o != cand) begin
        phase_o <= cand;
        locked  <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      bit_o     <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_o     <= d_q[phase_o];
      bit_valid <= locked;
    end
  end
endmodule
