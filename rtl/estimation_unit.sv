// estimation_unit: picks the class of the input image.
//
// After the last fully connected layer the 1000 class scores sit in a
// swapping buffer. The unit reads count scores from base onward, one per
// cycle, and keeps the largest (signed compare; on a tie the lower index
// wins). When done pulses, cls holds the index of the highest score and score
// its value; both stay until the next start.
// Handshake: start pulse with cfg stable, busy, one-cycle done. The buffer
// read returns data one cycle after its address.
// The function is the design's; the streaming arg-max is this implementation.
module estimation_unit
  import cnn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  est_cfg_t    cfg,
  output logic        busy,
  output logic        done,
  output logic        re,
  output baddr_t      raddr,
  input  data_t       rdata,
  output logic [12:0] cls,
  output data_t       score
);

  logic [12:0] idx;      // next index to read
  logic [12:0] ridx;     // index of the data arriving now
  logic        rv;
  logic        issuing;

  assign re    = issuing;
  assign raddr = baddr_t'(32'(cfg.base) + 32'(idx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      ridx    <= '0;
      rv      <= 1'b0;
      issuing <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
      cls     <= '0;
      score   <= '0;
    end else begin
      done <= 1'b0;
      rv   <= issuing;
      ridx <= idx;
      if (!busy) begin
        if (start && cfg.count != 0) begin
          busy    <= 1'b1;
          issuing <= 1'b1;
          idx     <= '0;
        end
      end else begin
        if (issuing) begin
          if (idx + 13'd1 >= cfg.count) issuing <= 1'b0;
          else                          idx     <= idx + 13'd1;
        end
        if (rv) begin
          if (ridx == 0 || rdata > score) begin
            score <= rdata;
            cls   <= ridx;
          end
          if (!issuing) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
