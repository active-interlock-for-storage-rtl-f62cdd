// tb_interlock_logic_unit: drives one logic unit with positions aimed at the
// edges of the Y window (+-2000 um) and the delta window (+-3200 um), and
// with every combination of the two DCCT bits and the gap bit. A reference
// model in integers predicts the relay drive and the four status bits, which
// must appear exactly one clock after the inputs. Also checks the reset
// state: relay open, no fault reported.
module tb_interlock_logic_unit;
  import interlock_pkg::*;

  logic clk = 0, rst_n = 0;
  pos_t y, y_other;
  logic dcct_low_a, dcct_low_b, gap_open;
  logic relay_drive;
  unit_status_t status;
  int checks = 0, failures = 0;
  int n_trip = 0, n_disabled_trip = 0;

  interlock_logic_unit dut (.*);

  always #5 clk = ~clk;

  // Edge-heavy choice of a position.
  function automatic int pick_pos();
    case ($urandom_range(5))
      0: return int'($urandom_range(4000)) - 2000;
      1: return 2000 + int'($urandom_range(2)) - 1;
      2: return -2000 + int'($urandom_range(2)) - 1;
      3: return int'($urandom_range(20000)) - 10000;
      4: return int'($urandom_range(65535)) - 32768;
      default: return int'($urandom_range(400)) - 200;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int yi, yo, d;
    bit e_yok, e_dok, e_dis, e_relay, e_zc;
    y = '0; y_other = '0; dcct_low_a = 0; dcct_low_b = 0; gap_open = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (relay_drive !== 1'b0 || status !== STATUS_IDLE) begin
      failures++;
      $display("FAIL reset state relay=%0b status=%b", relay_drive, status);
    end
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      yi = pick_pos();
      // delta near its limit in about a third of the cases
      if ($urandom_range(2) == 0) yo = yi - (3200 + int'($urandom_range(2)) - 1) * (($urandom_range(1) == 1) ? 1 : -1);
      else                        yo = pick_pos();
      if (yo > 32767) yo = 32767;
      if (yo < -32768) yo = -32768;
      @(negedge clk);
      y = pos_t'(yi); y_other = pos_t'(yo);
      {dcct_low_a, dcct_low_b, gap_open} = 3'($urandom);
      if ($urandom_range(1) == 0) gap_open = 0;
      d = yi - yo;
      e_yok  = (yi >= -2000) && (yi <= 2000);
      e_dok  = (d >= -3200) && (d <= 3200);
      e_dis  = (dcct_low_a && dcct_low_b) || gap_open;
      e_relay = (e_yok || e_dis) && (e_dok || e_dis);
      e_zc   = yi > 0;
      @(posedge clk);
      #1;
      checks++;
      if (relay_drive !== e_relay ||
          status !== '{zero_cross: e_zc, y_ok: e_yok, delta_ok: e_dok, disabled: e_dis}) begin
        failures++;
        if (failures < 10)
          $display("FAIL y=%0d yo=%0d dcct=%0b%0b gap=%0b relay=%0b/%0b status=%b exp=%b%b%b%b",
                   yi, yo, dcct_low_a, dcct_low_b, gap_open, relay_drive, e_relay,
                   status, e_zc, e_yok, e_dok, e_dis);
      end
      if (!e_relay) n_trip++;
      if (e_dis && !(e_yok && e_dok)) n_disabled_trip++;
    end
    checks++;
    if (n_trip == 0 || n_disabled_trip == 0) begin
      failures++;
      $display("FAIL coverage trips=%0d suppressed=%0d", n_trip, n_disabled_trip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
