// mode_cand_gen: turns a 9-bit mode-enable word into a stream of modes.
//
// load captures the enable word; from the next cycle on, one enabled mode
// per cycle is presented on cand_mode with cand_valid, lowest mode number
// first, and cand_last marks the final one. cand_ready = 0 holds the
// current candidate. A new load replaces whatever is pending. An all-zero
// word produces nothing and done pulses at once.
//
// Timing: cand_valid rises the cycle after load. Decoding the enable word
// into one candidate per cycle follows the encoder's mode candidate
// generator; the lowest-first order and the ready/hold handshake are this
// design's own choices.
module mode_cand_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [8:0] en,
  input  logic       cand_ready,
  output logic       cand_valid,
  output logic [3:0] cand_mode,
  output logic       cand_last,
  output logic       done
);
  logic [8:0] pend;
  logic [8:0] rest;
  logic [3:0] low;

  always_comb begin
    low = '0;
    for (int k = 8; k >= 0; k--) if (pend[k]) low = 4'(k);
    rest = pend;
    rest[low] = 1'b0;
  end

  assign cand_valid = (pend != '0);
  assign cand_mode  = low;
  assign cand_last  = cand_valid && (rest == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        pend <= en;
        done <= (en == '0);
      end else if (cand_valid && cand_ready) begin
        pend <= rest;
        done <= (rest == '0);
      end
    end
  end
endmodule
