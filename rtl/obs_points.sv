// obs_points: observation-point scan flip-flops appended to the circuit's scan
// chain. When the chain length F is not a multiple of the segment length N,
// every pattern still takes a whole number of N-cycle segments, so N - R
// (R = F mod N) shift cycles per pattern carry only filler bits. Adding
// LEN = N - R flip-flops that capture internal signals of the circuit turns
// those cycles into extra observability at no cost in test time.
//
// Each flip-flop is a scan cell: with clk_en high it shifts (scan_en high,
// si enters obs_q[0], so is obs_q[LEN-1]) or captures its observation input
// obs[i] (scan_en low, the capture cycle of the circuit). clk_en low holds it,
// exactly like the circuit's own scan cells.
//
// The idea and the flip-flop count follow the document; where the segment
// sits in the chain (after the circuit's last scan cell) and which signals it
// observes are the integrator's choice, here brought out as the obs port.
module obs_points #(
  parameter int unsigned LEN = 63
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clk_en,
  input  logic           scan_en,
  input  logic [LEN-1:0] obs,
  input  logic           si,
  output logic           so
);

  logic [LEN-1:0] obs_q;

  assign so = obs_q[LEN-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      obs_q <= '0;
    end else if (clk_en) begin
      if (scan_en) begin
        obs_q[0] <= si;
        for (int i = 1; i < int'(LEN); i++) obs_q[i] <= obs_q[i-1];
      end else begin
        obs_q <= obs;
      end
    end
  end

endmodule
