// ssc_controller: sequences one comparison of two tensors through stages
// A to E, following the architecture's cycle-level timing model.
//
// Phase lengths (T = STR_BYTES, K = number of BF indices):
//   HASH2 T   -> WRBF K -> OR 1 -> DIST 1      (D2: t_FNV + W + O + D)
//   HASH1 T   -> WRIDX K                       (D1: t_FNV + W)
//   TEST K -> LOOKUP ceil(G/B) -> CAM 1 -> APPEND 1
//          -> MULT ceil(Mt/P) -> DRAIN L+A     (eq. 4 with n/r = 1)
// where G is the number of Bloom filter candidates and Mt the number of
// confirmed pairs. LOOKUP and MULT end when the scheduler / pair buffer
// report nothing left (`sched_more`, `pair_more` low); each lasts at least
// one cycle. `cnt` counts cycles inside a phase and doubles as the byte
// index of the hashers and the index select of stages B and C.
// `busy` is high from the cycle after `start` through the last DRAIN cycle;
// `done` pulses for one cycle after it, and `cycles` then holds the number
// of busy cycles. The phase order and lengths follow the timing model; the
// hashing of D2 before D1 and the minimum of one cycle per phase are this
// design's choices.
module ssc_controller
  import ssc_pkg::*;
#(
  parameter int STR_BYTES = 40,
  parameter int K         = 7,
  parameter int L         = 5,
  parameter int A         = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        sched_more,
  input  logic        pair_more,
  output phase_t      phase,
  output logic [15:0] cnt,
  output logic        busy,
  output logic        done,
  output logic [31:0] cycles
);

  phase_t      nxt;
  logic        last;

  always_comb begin
    nxt  = phase;
    last = 1'b0;
    unique case (phase)
      PH_IDLE:   if (start) nxt = PH_HASH2;
      PH_HASH2:  begin last = (cnt == 16'(STR_BYTES - 1)); if (last) nxt = PH_WRBF;  end
      PH_WRBF:   begin last = (cnt == 16'(K - 1));         if (last) nxt = PH_OR;    end
      PH_OR:     begin last = 1'b1; nxt = PH_DIST;  end
      PH_DIST:   begin last = 1'b1; nxt = PH_HASH1; end
      PH_HASH1:  begin last = (cnt == 16'(STR_BYTES - 1)); if (last) nxt = PH_WRIDX; end
      PH_WRIDX:  begin last = (cnt == 16'(K - 1));         if (last) nxt = PH_TEST;  end
      PH_TEST:   begin last = (cnt == 16'(K - 1));         if (last) nxt = PH_LOOKUP; end
      PH_LOOKUP: begin last = !sched_more;                 if (last) nxt = PH_CAM;   end
      PH_CAM:    begin last = 1'b1; nxt = PH_APPEND; end
      PH_APPEND: begin last = 1'b1; nxt = PH_MULT;   end
      PH_MULT:   begin last = !pair_more;                  if (last) nxt = PH_DRAIN; end
      PH_DRAIN:  begin last = (cnt == 16'(L + A - 1));     if (last) nxt = PH_IDLE;  end
      default:   nxt = PH_IDLE;
    endcase
  end

  assign busy = (phase != PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= PH_IDLE;
      cnt    <= '0;
      done   <= 1'b0;
      cycles <= '0;
    end else begin
      phase <= nxt;
      cnt   <= (last || phase == PH_IDLE) ? '0 : cnt + 16'd1;
      done  <= (phase == PH_DRAIN) && last;
      if (phase == PH_IDLE && start)
        cycles <= '0;
      else if (busy)
        cycles <= cycles + 32'd1;
    end
  end

endmodule
