// sea_ctrl: round controller of the SEA loop architecture.
//
// A start pulse while idle is accepted (load = 1) and the controller then
// runs rounds t = 1 .. NR, one per clock (round_en = 1, busy = 1). With
// h = floor(NR/2) it drives, for the round computed in the current cycle:
//   const_idx = t for t <= h, NR - t after it: the i of the key-round
//               constant C(i), counting up to the middle and back down;
//   swap      = 1 in round h: the key registers take the key-round result
//               with left and right halves exchanged (the "Swap" command);
//   use_left  = 1 for t > h: the cipher round takes the left key register
//               instead of the right one (the "Switch" command). After the
//               exchange the left register holds KR_h, the key the paper
//               says is taken before the switch.
// done is high in the cycle of round NR, so the result is in the registers
// after that clock edge. Start while busy is ignored.
// The paper names Swap and Switch and says when they act; the counter,
// the start/done handshake and the reset are this design's choices.
module sea_ctrl #(
  parameter int unsigned NR = 93,
  localparam int unsigned CW = $clog2(NR + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          load,
  output logic          round_en,
  output logic          swap,
  output logic          use_left,
  output logic [CW-1:0] const_idx,
  output logic          done
);

  localparam int unsigned H = NR / 2;

  if (NR % 2 != 1 || NR < 3) begin : g_bad_nr
    $error("sea_ctrl: the round count NR must be odd and at least 3");
  end

  logic [CW-1:0] t;  // round being computed, 0 when idle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0;
    end else if (load) begin
      t <= CW'(1);
    end else if (busy) begin
      t <= (t == CW'(NR)) ? '0 : t + CW'(1);
    end
  end

  always_comb begin
    busy      = (t != '0);
    load      = start && !busy;
    round_en  = busy;
    swap      = (t == CW'(H));
    use_left  = (t > CW'(H));
    const_idx = use_left ? CW'(NR) - t : t;
    done      = (t == CW'(NR));
  end

  // Rules of the schedule
  a_swap_once: assert property (@(posedge clk) disable iff (!rst_n) swap |-> busy && !use_left);
  a_done_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> busy && use_left);
  a_t_range:   assert property (@(posedge clk) disable iff (!rst_n) t <= CW'(NR));

endmodule
