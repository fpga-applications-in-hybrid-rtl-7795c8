// tb_qei: drives quadrature A/B sequences with random step spacing in both
// directions, illegal double steps and index pulses. A model position
// counts four edges per line (A leading B counts up) and the index clears
// it; checked: position after each step (allowing the synchroniser delay),
// the direction flag, the error count, and the speed sample, which must
// equal the net step count inside each SPEED_WIN window and arrive once
// every SPEED_WIN clocks.
// The 16-bit position counter follows the document; four-edge decoding, the
// index clear and the speed window are this design's choices.
module tb_qei;
  localparam int WIN = 400;
  logic clk = 0, rst = 1, enc_a = 0, enc_b = 0, enc_z = 0;
  logic [15:0] position;
  logic signed [15:0] speed;
  logic speed_valid, dir_up;
  logic [7:0] err_cnt;
  int checks = 0, failures = 0, cyc = 0;
  int model_pos = 0, model_err = 0, last_sv = -1, sv_count = 0;
  int clears = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  qei #(.SPEED_WIN(WIN)) dut (.*);

  // Gray sequence 00 -> 10 -> 11 -> 01 is A leading B (counting up)
  task automatic move(bit up);
    logic [1:0] s;
    s = {enc_a, enc_b};
    case ({up, s})
      3'b1_00: s = 2'b10;
      3'b1_10: s = 2'b11;
      3'b1_11: s = 2'b01;
      3'b1_01: s = 2'b00;
      3'b0_00: s = 2'b01;
      3'b0_01: s = 2'b11;
      3'b0_11: s = 2'b10;
      3'b0_10: s = 2'b00;
    endcase
    @(negedge clk);
    {enc_a, enc_b} = s;
    model_pos = (model_pos + (up ? 1 : -1)) & 16'hFFFF;
    repeat (4) @(negedge clk);  // synchroniser and counter
    checks++;
    if (int'(position) != model_pos || dir_up != up) begin
      failures++; $display("FAIL pos %0d exp %0d dir %0d", position, model_pos, dir_up);
    end
    repeat ($urandom_range(6)) @(negedge clk);
  endtask

  // speed sample rate
  always @(posedge clk) begin
    if (speed_valid) begin
      sv_count++;
      if (last_sv >= 0) begin
        checks++;
        if (cyc - last_sv != WIN) begin failures++; $display("FAIL speed rate %0d", cyc - last_sv); end
      end
      last_sv = cyc;
    end
  end

  initial begin
    bit up;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      case ($urandom_range(40))
        0: begin  // illegal: both lines change
          @(negedge clk);
          {enc_a, enc_b} = ~{enc_a, enc_b};
          model_err++;
          repeat (4) @(negedge clk);
          checks++;
          if (int'(err_cnt) != model_err || int'(position) != model_pos) begin
            failures++; $display("FAIL err %0d exp %0d", err_cnt, model_err);
          end
          // return to the previous state, also illegal
          @(negedge clk);
          {enc_a, enc_b} = ~{enc_a, enc_b};
          model_err++;
          repeat (4) @(negedge clk);
        end
        1: begin  // index pulse clears the position
          @(negedge clk); enc_z = 1;
          repeat (4) @(negedge clk);
          enc_z = 0;
          model_pos = 0; clears++;
          checks++;
          if (position != 0) begin failures++; $display("FAIL index clear %0d", position); end
        end
        default: begin
          up = (n / 500) % 2 == 0 ? ($urandom_range(9) != 0) : ($urandom_range(9) == 0);
          move(up);
        end
      endcase
    end
    checks++;
    if (sv_count < 10 || clears == 0) begin failures++; $display("FAIL coverage %0d %0d", sv_count, clears); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // speed value: an independent net-step count per window, taken from the
  // A/B lines delayed like the decoder's synchroniser. A step decoded on
  // the clock that closes a window belongs to the next window.
  logic [1:0] ab_d1, ab_d2, ab_d3;
  int net = 0, net_mark = 0, net_prev = 0, wcnt = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (speed_valid) begin
        checks++;
        if (int'(speed) != net_prev) begin
          failures++; $display("FAIL speed %0d exp %0d", speed, net_prev);
        end
      end
      if (wcnt == WIN - 1) begin
        wcnt = 0; net_prev = net - net_mark; net_mark = net;
      end else wcnt++;
      if (^(ab_d3 ^ ab_d2))
        net += ((ab_d3 == 2'b00 && ab_d2 == 2'b10) || (ab_d3 == 2'b10 && ab_d2 == 2'b11) ||
                (ab_d3 == 2'b11 && ab_d2 == 2'b01) || (ab_d3 == 2'b01 && ab_d2 == 2'b00)) ? 1 : -1;
    end
    ab_d1 <= {enc_a, enc_b}; ab_d2 <= ab_d1; ab_d3 <= ab_d2;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
