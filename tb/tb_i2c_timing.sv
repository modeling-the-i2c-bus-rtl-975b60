// tb_i2c_timing: checks the timing layer at its default parameters.
//   * `step` pulses exactly once every STEP_DIV clocks;
//   * `bus_sample` is the pin levels two clocks late;
//   * line requests held for random times are applied in the safe order:
//     a requested fall of SCL happens on the next clock, any other change
//     waits until EDGE_GAP clocks have passed since the previous change,
//     SDA changes before a rising SCL, and a request held long enough is
//     reached within 2*(EDGE_GAP+1)+1 clocks.
`timescale 1ns/1ps
module tb_i2c_timing;
  import i2c_pkg::*;

  localparam int STEP_DIV = 250;
  localparam int EDGE_GAP = 13;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic scl_i = 1'b1, sda_i = 1'b1;
  logic scl_drive_low, sda_drive_low, step;
  bus_t bus_sample, dev_bus = BUS_IDLE;

  i2c_timing #(.STEP_DIV(STEP_DIV), .EDGE_GAP(EDGE_GAP)) dut (
    .clk, .rst_n, .scl_i, .sda_i, .scl_drive_low, .sda_drive_low,
    .step, .bus_sample, .dev_bus);

  int checks = 0, failures = 0;
  int n_steps = 0, n_scl_fall = 0, n_scl_rise = 0, n_sda = 0, n_reached = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Observe every clock (sampled just before the edge).
  bus_t  pin_hist [3];
  bus_t  req_prev;
  logic  scl_prev = 1'b1, sda_prev = 1'b1;
  int    since_change = 1000, since_step = -1, req_age = 0;
  bit    run = 0;

  always @(negedge clk) if (run) begin
    logic scl_o, sda_o;
    scl_o = !scl_drive_low;
    sda_o = !sda_drive_low;
    // step period
    if (step) begin
      if (since_step >= 0) check(since_step == STEP_DIV, $sformatf("step period %0d", since_step));
      since_step = 1;
      n_steps++;
    end else if (since_step >= 0) since_step++;
    // synchronizer
    check(bus_sample == pin_hist[1], "pins seen two clocks late");
    pin_hist[1] = pin_hist[0];
    pin_hist[0] = '{scl: scl_i, sda: sda_i};
    // line changes
    if (scl_o != scl_prev || sda_o != sda_prev) begin
      check(!(scl_o != scl_prev && sda_o != sda_prev), "one line at a time");
      if (scl_prev && !scl_o) begin
        check(!req_prev.scl, "SCL falls only on request");
        n_scl_fall++;
      end else begin
        check(since_change > EDGE_GAP, $sformatf("gap %0d before a change", since_change));
        if (sda_o != sda_prev) begin
          check(sda_o == req_prev.sda, "SDA moves to the request");
          n_sda++;
        end else begin
          check(req_prev.scl && sda_prev == req_prev.sda, "SCL rises after SDA is set");
          n_scl_rise++;
        end
      end
      since_change = 1;
    end else begin
      since_change++;
      if (scl_prev && !req_prev.scl && req_age >= 1)
        check(0, "a requested SCL fall is not delayed");
    end
    if (req_age > 2 * (EDGE_GAP + 1) + 1) begin
      check(scl_o == req_prev.scl && sda_o == req_prev.sda, "request reached");
      if (req_age == 2 * (EDGE_GAP + 1) + 2) n_reached++;
    end
    scl_prev = scl_o;
    sda_prev = sda_o;
    // new request for the next clock
    req_age  = (dev_bus == req_prev) ? req_age + 1 : 1;
    req_prev = dev_bus;
  end

  initial begin
    pin_hist[0] = BUS_IDLE;
    pin_hist[1] = BUS_IDLE;
    req_prev    = BUS_IDLE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    #1 run = 1;
    for (int i = 0; i < 3000; i++) begin
      int hold;
      hold = ($urandom % 3 == 0) ? int'(1 + $urandom % 10) : int'(20 + $urandom % 60);
      @(posedge clk);
      #1;
      dev_bus = bus_t'($urandom % 4);
      for (int k = 0; k < hold; k++) begin
        scl_i = $urandom % 2;
        sda_i = $urandom % 2;
        @(posedge clk);
        #1;
      end
    end
    check(n_steps > 100 && n_scl_fall > 0 && n_scl_rise > 0 && n_sda > 0 && n_reached > 0,
          "every kind of change seen");
    $display("cases: steps=%0d scl_fall=%0d scl_rise=%0d sda=%0d reached=%0d",
             n_steps, n_scl_fall, n_scl_rise, n_sda, n_reached);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
