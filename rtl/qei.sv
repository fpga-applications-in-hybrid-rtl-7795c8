// qei: quadrature encoder interface, the position and speed feedback of the
// FOC loop.
//
// The A, B and index signals (from the resolver-to-digital converter's
// encoder emulation) are synchronised with two flip-flops each and decoded
// four edges per line: every valid Gray-code step of (A,B) moves a 16-bit
// position counter by one, upward when A leads B and downward when B leads
// A. A step that changes A and B at once is illegal; it is counted in
// err_cnt and ignored. A rising edge of the index clears the position when
// INDEX_CLEAR is set. Every SPEED_WIN clocks the signed position change over
// that window is latched as the speed (counts per window), with speed_valid; the speed
// uses its own step tally so that an index clear does not disturb it.
//
// The 16-bit position counter is the document's. Four-edge decoding, the
// index behaviour, the speed window and the direction convention are this
// design's choices; the document states that counting up meant the reverse
// direction of its motor, which is a matter of wiring A and B.
module qei #(
  parameter int unsigned SPEED_WIN   = 20000,  // 100 us at 200 MHz
  parameter bit          INDEX_CLEAR = 1'b1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enc_a,
  input  logic               enc_b,
  input  logic               enc_z,
  output logic [15:0]        position,
  output logic signed [15:0] speed,
  output logic               speed_valid,
  output logic               dir_up,      // last step direction
  output logic [7:0]         err_cnt
);

  localparam int unsigned WW = $clog2(SPEED_WIN + 1);

  logic [1:0] a_s, b_s, z_s;
  logic       a_q, b_q, z_q;
  logic       step, up, bad;
  logic [WW-1:0] win;
  logic [15:0]   pos_prev;
  logic [15:0]   tally;     // step count for speed, not cleared by the index

  always_ff @(posedge clk) begin
    if (rst) begin
      a_s <= '0; b_s <= '0; z_s <= '0;
      a_q <= 1'b0; b_q <= 1'b0; z_q <= 1'b0;
    end else begin
      a_s <= {a_s[0], enc_a};
      b_s <= {b_s[0], enc_b};
      z_s <= {z_s[0], enc_z};
      a_q <= a_s[1];
      b_q <= b_s[1];
      z_q <= z_s[1];
    end
  end

  always_comb begin
    step = (a_s[1] ^ a_q) ^ (b_s[1] ^ b_q);   // exactly one line changed
    bad  = (a_s[1] ^ a_q) & (b_s[1] ^ b_q);   // both changed
    // A leads B (00,10,11,01): the old A equals the new B
    up   = ~(a_q ^ b_s[1]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      position    <= '0;
      dir_up      <= 1'b1;
      err_cnt     <= '0;
      win         <= '0;
      pos_prev    <= '0;
      tally       <= '0;
      speed       <= '0;
      speed_valid <= 1'b0;
    end else begin
      speed_valid <= 1'b0;
      if (INDEX_CLEAR && z_s[1] && !z_q) begin
        position <= '0;
      end else if (step) begin
        position <= up ? position + 16'd1 : position - 16'd1;
        dir_up   <= up;
      end
      if (step) tally <= up ? tally + 16'd1 : tally - 16'd1;
      if (bad && err_cnt != 8'hFF) err_cnt <= err_cnt + 8'd1;
      if (win == WW'(SPEED_WIN - 1)) begin
        win         <= '0;
        speed       <= signed'(tally - pos_prev);
        pos_prev    <= tally;
        speed_valid <= 1'b1;
      end else begin
        win <= win + 1'b1;
      end
    end
  end

endmodule
