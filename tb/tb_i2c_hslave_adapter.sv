// tb_i2c_hslave_adapter: sends random byte-layer events (START, STOP,
// received bytes, master ACKs) into the high-level slave adapter while a
// random slave answers its calls, and checks the calls made and the
// reaction returned against the rules: the first byte after START is an
// address (with a read call for a read address), later bytes are writes,
// an ACK asks for the next byte to send, STOP is passed on, and a refused
// address or write leaves the layer idle.
`timescale 1ns/1ps
module tb_i2c_hslave_adapter;
  import i2c_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic    ev_valid = 1'b0;
  bev_t    ev = '0;
  breact_t react;
  hs_req_t hs_req;
  hs_rsp_t hs_rsp = '0;

  i2c_hslave_adapter dut (.clk, .rst_n, .ev_valid, .ev, .react, .hs_req, .hs_rsp);

  int checks = 0, failures = 0;
  int n_addr_w = 0, n_addr_r = 0, n_addr_nack = 0, n_write = 0, n_wnack = 0;
  int n_ackread = 0, n_stop = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  localparam breact_t R_IDLE = '{kind: BREACT_IDLE, data: 8'h00};
  localparam breact_t R_RECV = '{kind: BREACT_RECEIVE, data: 8'h00};

  initial begin
    bit first;
    first = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      hs_req_t  exp_req;
      breact_t  exp_r;
      int       k;
      @(negedge clk);
      k = $urandom % 10;
      ev_valid = ($urandom % 8 != 0);
      ev.data  = 8'($urandom);
      ev.kind  = (k < 2) ? BEV_START : (k < 3) ? BEV_STOP : (k < 8) ? BEV_RECEIVE : BEV_ACK;
      hs_rsp   = hs_rsp_t'($urandom);
      exp_req  = '0;
      exp_r    = R_IDLE;
      if (ev_valid) begin
        case (ev.kind)
          BEV_START: begin exp_r = R_RECV; end
          BEV_STOP:  begin exp_req.stop_call = 1; n_stop++; end
          BEV_RECEIVE:
            if (first) begin
              exp_req.addr_call = 1;
              exp_req.addr      = ev.data[7:1];
              exp_req.is_read   = ev.data[0];
              exp_req.read_call = ev.data[0];
              if (!hs_rsp.addr_ack) begin exp_r = R_IDLE; n_addr_nack++; end
              else if (ev.data[0]) begin
                exp_r = '{kind: BREACT_TRANSMIT, data: hs_rsp.rdata}; n_addr_r++;
              end else begin exp_r = R_RECV; n_addr_w++; end
            end else begin
              exp_req.write_call = 1;
              exp_req.wdata      = ev.data;
              exp_r = hs_rsp.write_ack ? R_RECV : R_IDLE;
              if (hs_rsp.write_ack) n_write++; else n_wnack++;
            end
          default: begin
            exp_req.read_call = 1;
            exp_r = '{kind: BREACT_TRANSMIT, data: hs_rsp.rdata};
            n_ackread++;
          end
        endcase
      end
      #1;
      check(hs_req == exp_req, $sformatf("calls %p expected %p", hs_req, exp_req));
      check(react == exp_r, $sformatf("reaction %p expected %p", react, exp_r));
      if (ev_valid && ev.kind != BEV_ACK) first = (ev.kind == BEV_START);
    end
    check(n_addr_w > 0 && n_addr_r > 0 && n_addr_nack > 0 && n_write > 0 &&
          n_wnack > 0 && n_ackread > 0 && n_stop > 0, "every case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
