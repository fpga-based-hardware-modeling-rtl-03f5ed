// Sorting module: parallel (odd-even transposition) bubble sort.
//
// Sorts N records, each a float key (the fitness) and a payload (the
// pigeon's index), by key: ascending with DESCENDING = 0, so that the
// fittest pigeon of a minimisation problem comes first; descending with
// DESCENDING = 1. One basic operation is an even phase, comparing pairs
// (0,1), (2,3), ..., followed by an odd phase, comparing pairs (1,2),
// (3,4), ...; the pairs of a phase are compared and swapped in parallel.
// ceil(N/2) basic operations (N phases) sort any input. Only N/2 swappers
// exist (five for N = 10); a state machine steers them onto the pairs of
// the current phase and writes the results back, one phase per clock.
//
// Interface: pulse start for one clock while idle with key_in/pay_in
// valid; done pulses for one clock with key_out/pay_out valid, and they
// hold until the next start. done is sampled high N + 1 clocks after start
// (one load clock, then N phases; done rises with the last phase), 11
// clocks for N = 10.
//
// The algorithm, the phase order and the reuse of N/2 swappers follow the
// reference design; one phase per clock is this design's own choice.
module bubble_sort
  import pio_pkg::*;
#(
  parameter int unsigned N  = PIO_NP,
  parameter int unsigned PW = 4,
  parameter bit DESCENDING  = 1'b0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  f32_t          key_in  [N],
  input  logic [PW-1:0] pay_in  [N],
  output logic          busy,
  output logic          done,
  output f32_t          key_out [N],
  output logic [PW-1:0] pay_out [N]
);
  localparam int unsigned NSW    = (N / 2 > 0) ? N / 2 : 1;
  localparam int unsigned PHASES = 2 * ((N + 1) / 2);

  f32_t          key [N];
  logic [PW-1:0] pay [N];
  logic          running;
  logic          odd;              // current phase is an odd phase
  int unsigned   phase;

  f32_t          sa_key [NSW];
  f32_t          sb_key [NSW];
  f32_t          slo_key[NSW];
  f32_t          shi_key[NSW];
  logic [PW-1:0] sa_pay [NSW];
  logic [PW-1:0] sb_pay [NSW];
  logic [PW-1:0] slo_pay[NSW];
  logic [PW-1:0] shi_pay[NSW];
  logic          s_use  [NSW];     // swapper has a pair in this phase

  // Steer the swappers onto the pairs of the current phase.
  always_comb begin
    for (int s = 0; s < NSW; s++) begin
      int unsigned j;
      j = 2 * s + (odd ? 1 : 0);
      s_use[s] = (j + 1 < N);
      if (s_use[s]) begin
        sa_key[s] = key[j];
        sa_pay[s] = pay[j];
        sb_key[s] = key[j+1];
        sb_pay[s] = pay[j+1];
      end else begin
        sa_key[s] = F_ZERO;
        sa_pay[s] = '0;
        sb_key[s] = F_ZERO;
        sb_pay[s] = '0;
      end
    end
  end

  for (genvar s = 0; s < NSW; s++) begin : g_sw
    swapper #(.PW(PW), .DESCENDING(DESCENDING)) u_sw (
      .a_key(sa_key[s]), .a_pay(sa_pay[s]), .b_key(sb_key[s]), .b_pay(sb_pay[s]),
      .lo_key(slo_key[s]), .lo_pay(slo_pay[s]), .hi_key(shi_key[s]), .hi_pay(shi_pay[s]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      odd     <= 1'b0;
      phase   <= 0;
      done    <= 1'b0;
      for (int i = 0; i < N; i++) begin
        key[i] <= F_ZERO;
        pay[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          key     <= key_in;
          pay     <= pay_in;
          running <= 1'b1;
          odd     <= 1'b0;
          phase   <= 0;
        end
      end else begin
        for (int s = 0; s < NSW; s++) begin
          if (s_use[s]) begin
            key[2*s + (odd ? 1 : 0)]     <= slo_key[s];
            pay[2*s + (odd ? 1 : 0)]     <= slo_pay[s];
            key[2*s + (odd ? 1 : 0) + 1] <= shi_key[s];
            pay[2*s + (odd ? 1 : 0) + 1] <= shi_pay[s];
          end
        end
        odd   <= ~odd;
        phase <= phase + 1;
        if (phase == PHASES - 1) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  assign busy    = running;
  assign key_out = key;
  assign pay_out = pay;
endmodule
