// i2c_hslave_adapter: high-level slave layer (byte events <-> slave calls).
//
// Turns byte-layer events into the four calls a high-level slave answers:
//   START              receive the next byte as an address byte
//   first byte         slaveAddress(byte[7:1], is_read = byte[0]); no ack
//                      ends the message; for a read, slaveRead supplies the
//                      first byte to transmit in the same cycle
//   later byte         slaveWrite(byte); its ack decides whether to go on
//   master ACK         slaveRead supplies the next byte to transmit
//   STOP               slaveStop
// The calls go out as one `hs_req_t` bundle and the slave answers
// combinationally through `hs_rsp_t`. A cycle with both addr_call and
// read_call means "address, then read if the address was acknowledged", so
// the request never depends on the response. The mapping follows the protocol
// model's high-level slave layer; the call bundle is this design's own.
module i2c_hslave_adapter
  import i2c_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ev_valid,
  input  bev_t    ev,
  output breact_t react,
  output hs_req_t hs_req,
  input  hs_rsp_t hs_rsp
);

  logic first_q, first_d;

  always_comb begin
    first_d = first_q;
    react   = '{kind: BREACT_IDLE, data: 8'h00};
    hs_req  = '0;
    if (ev_valid) begin
      unique case (ev.kind)
        BEV_START: begin
          first_d = 1'b1;
          react   = '{kind: BREACT_RECEIVE, data: 8'h00};
        end
        BEV_STOP: begin
          first_d          = 1'b0;
          hs_req.stop_call = 1'b1;
        end
        BEV_RECEIVE: begin
          first_d = 1'b0;
          if (first_q) begin
            hs_req.addr_call = 1'b1;
            hs_req.addr      = ev.data[7:1];
            hs_req.is_read   = ev.data[0];
            hs_req.read_call = ev.data[0];
            if (!hs_rsp.addr_ack) begin
              react = '{kind: BREACT_IDLE, data: 8'h00};
            end else if (ev.data[0]) begin
              react = '{kind: BREACT_TRANSMIT, data: hs_rsp.rdata};
            end else begin
              react = '{kind: BREACT_RECEIVE, data: 8'h00};
            end
          end else begin
            hs_req.write_call = 1'b1;
            hs_req.wdata      = ev.data;
            react = hs_rsp.write_ack ? '{kind: BREACT_RECEIVE, data: 8'h00}
                                     : '{kind: BREACT_IDLE, data: 8'h00};
          end
        end
        default: begin // BEV_ACK
          hs_req.read_call = 1'b1;
          react = '{kind: BREACT_TRANSMIT, data: hs_rsp.rdata};
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_q <= 1'b0;
    else        first_q <= first_d;
  end

endmodule
