// tb_function_unit_and_bus: end-to-end test of the whole datapath at its
// default size.
//
// Part 1 replays the recorded session of the original design: four loads
// from the switches, the thirteen operations each stored into a register,
// two more loads, and a final idle setting. Before every press it checks the
// operand buses, the result and {V,C,N,Z}; after it, the four registers, all
// against the recorded values.
// Part 2 runs random switch settings and presses against a model (four
// registers plus the integer reference of the function unit) and counts how
// often each mechanism occurred: every opcode stored, an unused code, loads
// from the switches, stores of the result, a store into one of the operation's
// own source registers, a press held for many clocks, and each status bit set.
// A mechanism that never occurred counts as a failure. It also checks that a
// register changes exactly two clock edges after a press is first sampled.
module tb_function_unit_and_bus;
  import fu_pkg::*;
  import fu_ref_pkg::*;

  logic clk, rst_n;
  logic [1:0] key_n;
  logic [9:0] sw;
  word_t [3:0] regs, model;
  word_t operand_a, operand_b, result;
  vcnz_t vcnz;
  int checks = 0, failures = 0;
  int cycles;

  int n_op [16];
  int n_sw_load = 0, n_fu_store = 0, n_self = 0, n_long = 0;
  int n_v = 0, n_c = 0, n_n = 0, n_z = 0;

  initial begin
    clk = 1'b0;
    cycles = 0;
  end
  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function_unit_and_bus dut (
    .clk(clk), .rst_n(rst_n), .key_n(key_n), .sw(sw), .regs(regs),
    .operand_a(operand_a), .operand_b(operand_b), .result(result), .vcnz(vcnz));

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h (sw=%b regs=%h)", what, got, exp, sw, regs);
    end
  endtask

  // Press one button (0 = KEY[0], 1 = KEY[1]) for 'hold' clocks with the
  // current switch setting, checking the load timing and the model.
  task automatic press(input int key, input int hold);
    word_t expv;
    logic [11:0] ref_out;
    ref_out = fu_ref(model[sw[9:8]], model[sw[7:6]], sw[5:2]);
    expv = (key == 0) ? word_t'(sw[9:2]) : ref_out[7:0];
    @(negedge clk);
    key_n = (key == 0) ? 2'b10 : 2'b01;
    @(posedge clk);                       // first sample
    @(negedge clk);
    expect_eq("no early load", 32'(regs), 32'(model));
    @(posedge clk);
    @(negedge clk);
    expect_eq("no early load", 32'(regs), 32'(model));
    @(posedge clk);                       // load edge
    @(negedge clk);
    model[sw[1:0]] = expv;
    expect_eq("load", 32'(regs), 32'(model));
    repeat (hold) @(negedge clk);
    expect_eq("single load while held", 32'(regs), 32'(model));
    key_n = 2'b11;
    repeat (3) @(negedge clk);
  endtask

  task automatic check_outputs();
    logic [11:0] r;
    r = fu_ref(model[sw[9:8]], model[sw[7:6]], sw[5:2]);
    expect_eq("operand_a", 32'(operand_a), 32'(model[sw[9:8]]));
    expect_eq("operand_b", 32'(operand_b), 32'(model[sw[7:6]]));
    expect_eq("result", 32'(result), 32'(r[7:0]));
    expect_eq("vcnz", 32'(vcnz), 32'(r[11:8]));
  endtask

  // Recorded session: switch fields, button, and the recorded values
  typedef struct packed {
    logic [9:0]  sw;      // {A sel, B sel, code, dest}
    logic [1:0]  key;     // 0: KEY[0], 1: KEY[1], 2: none
    logic [7:0]  a, b, r; // buses and result before the press
    logic [3:0]  vcnz;
    logic [31:0] regs;    // {val3, val2, val1, val0} after the press
  } step_t;

  localparam step_t REC [20] = '{
    '{10'b10_01_0001_00, 2'd0, 8'h00, 8'h00, 8'h00, 4'b0101, 32'h00_00_00_91},
    '{10'b00_11_0111_01, 2'd0, 8'h91, 8'h00, 8'hFF, 4'b0010, 32'h00_00_37_91},
    '{10'b01_10_0100_10, 2'd0, 8'h37, 8'h00, 8'h00, 4'b0001, 32'h00_64_37_91},
    '{10'b11_00_0100_11, 2'd0, 8'h00, 8'h91, 8'h00, 4'b0001, 32'hC4_64_37_91},
    '{10'b11_00_0000_00, 2'd1, 8'hC4, 8'h91, 8'h55, 4'b1100, 32'hC4_64_37_55},
    '{10'b11_11_0001_01, 2'd1, 8'hC4, 8'hC4, 8'h00, 4'b0101, 32'hC4_64_00_55},
    '{10'b00_00_0110_01, 2'd1, 8'h55, 8'h55, 8'hAA, 4'b0010, 32'hC4_64_AA_55},
    '{10'b10_00_1010_11, 2'd1, 8'h64, 8'h55, 8'h64, 4'b0000, 32'h64_64_AA_55},
    '{10'b00_01_1101_10, 2'd1, 8'h55, 8'hAA, 8'hFE, 4'b0010, 32'h64_FE_AA_55},
    '{10'b00_01_1110_00, 2'd1, 8'h55, 8'hAA, 8'h50, 4'b0000, 32'h64_FE_AA_50},
    '{10'b00_01_0111_10, 2'd0, 8'h50, 8'hAA, 8'hFF, 4'b0010, 32'h64_17_AA_50},
    '{10'b11_10_1000_01, 2'd0, 8'h64, 8'h17, 8'h00, 4'b0001, 32'h64_17_E8_50},
    '{10'b01_10_1001_00, 2'd1, 8'hE8, 8'h17, 8'h00, 4'b0001, 32'h64_17_E8_00},
    '{10'b01_00_0011_01, 2'd1, 8'hE8, 8'h00, 8'h18, 4'b0000, 32'h64_17_18_00},
    '{10'b00_10_1011_10, 2'd1, 8'h00, 8'h17, 8'hE9, 4'b0010, 32'h64_E9_18_00},
    '{10'b11_00_0010_11, 2'd1, 8'h64, 8'h00, 8'h66, 4'b0000, 32'h66_E9_18_00},
    '{10'b01_10_0111_11, 2'd1, 8'h18, 8'hE9, 8'hF7, 4'b0010, 32'hF7_E9_18_00},
    '{10'b01_10_0100_11, 2'd1, 8'h18, 8'hE9, 8'h08, 4'b0000, 32'h08_E9_18_00},
    '{10'b00_11_0101_11, 2'd1, 8'h00, 8'h08, 8'hF7, 4'b0010, 32'hF7_E9_18_00},
    '{10'b00_00_0000_00, 2'd2, 8'h00, 8'h00, 8'h00, 4'b0001, 32'hF7_E9_18_00}
  };

  initial begin
    foreach (n_op[i]) n_op[i] = 0;
    rst_n = 1'b0;
    key_n = 2'b11;
    sw    = '0;
    model = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_eq("reset", 32'(regs), 32'(32'h0));

    // Part 1: recorded session
    foreach (REC[i]) begin
      sw = REC[i].sw;
      @(negedge clk);
      expect_eq("rec operand_a", 32'(operand_a), 32'(REC[i].a));
      expect_eq("rec operand_b", 32'(operand_b), 32'(REC[i].b));
      expect_eq("rec result", 32'(result), 32'(REC[i].r));
      expect_eq("rec vcnz", 32'(vcnz), 32'(REC[i].vcnz));
      if (REC[i].key != 2'd2) begin
        press(int'(REC[i].key), 3);
        if (REC[i].key == 2'd0) n_sw_load++; else n_fu_store++;
        if (REC[i].key == 2'd1) n_op[REC[i].sw[5:2]]++;
      end
      expect_eq("rec regs", 32'(regs), 32'(REC[i].regs));
      expect_eq("model agrees", 32'(model), 32'(REC[i].regs));
    end

    // Part 2: random operation sequence against the model
    repeat (3000) begin
      int key, hold;
      logic [11:0] r;
      sw = 10'($urandom);
      @(negedge clk);
      check_outputs();
      r = fu_ref(model[sw[9:8]], model[sw[7:6]], sw[5:2]);
      if (r[11]) n_v++;
      if (r[10]) n_c++;
      if (r[9])  n_n++;
      if (r[8])  n_z++;
      key  = ($urandom_range(0, 3) == 0) ? 0 : 1;
      hold = ($urandom_range(0, 19) == 0) ? 40 : $urandom_range(0, 4);
      if (hold == 40) n_long++;
      if (key == 0) n_sw_load++;
      else begin
        n_fu_store++;
        n_op[sw[5:2]]++;
        if (sw[1:0] == sw[9:8] || sw[1:0] == sw[7:6]) n_self++;
      end
      press(key, hold);
    end

    // Coverage of the mechanisms
    for (int f = 0; f < 16; f++) begin
      checks++;
      if (n_op[f] == 0) begin failures++; $display("FAIL code %b never stored", 4'(f)); end
    end
    checks++;
    if (n_sw_load == 0 || n_fu_store == 0 || n_self == 0 || n_long == 0 ||
        n_v == 0 || n_c == 0 || n_n == 0 || n_z == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("switch loads=%0d result stores=%0d self-referencing stores=%0d long holds=%0d",
             n_sw_load, n_fu_store, n_self, n_long);
    $display("status set: V=%0d C=%0d N=%0d Z=%0d", n_v, n_c, n_n, n_z);
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
