// Memory controller with an upper-bounded access latency.
//
// In analysis mode every access is answered exactly LAT_MAX cycles after the controller accepts
// it, whatever the DRAM actually took (for example the extra turnaround of a read after a
// write). The measured time of each access is then the worst case, so execution times measured
// in analysis mode upper-bound those seen in operation. In operation mode the answer is passed
// on the cycle after the DRAM gives it. If the DRAM takes longer than LAT_MAX in analysis mode
// the bound is broken: `bound_violation` pulses and the answer is passed on when it arrives.
// LAT_MAX is this design's number; the design does not give one.
//
// Interface: req_valid/req_ready handshake, one access at a time; resp_valid pulses with
// resp_rdata (also for writes, as an acknowledge). DRAM side: dram_req_valid pulses for one
// cycle with the access; dram_resp_valid pulses with dram_rdata when the DRAM is done.
module mem_ctrl
  import mbpta_pkg::*;
#(
  parameter int unsigned LAT_MAX = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        analysis_mode,
  input  logic        req_valid,
  input  mem_req_t    req,
  output logic        req_ready,
  output logic        resp_valid,
  output logic [31:0] resp_rdata,
  output logic        dram_req_valid,
  output mem_req_t    dram_req,
  input  logic        dram_resp_valid,
  input  logic [31:0] dram_rdata,
  output logic        bound_violation
);
  localparam int unsigned CW = $clog2(LAT_MAX + 2);

  typedef enum logic [1:0] {MC_IDLE, MC_WAIT} mc_state_t;
  mc_state_t   state;
  logic [CW-1:0] cnt;       // cycles since the access was accepted
  logic        have_data;
  logic [31:0] data_q;

  assign req_ready = (state == MC_IDLE);

  // The DRAM's answer, whether it arrives in this cycle or arrived earlier.
  logic        data_now;
  logic [31:0] data_now_v;
  assign data_now   = have_data || dram_resp_valid;
  assign data_now_v = have_data ? data_q : dram_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= MC_IDLE;
      cnt             <= '0;
      have_data       <= 1'b0;
      data_q          <= '0;
      dram_req_valid  <= 1'b0;
      dram_req        <= '0;
      resp_valid      <= 1'b0;
      resp_rdata      <= '0;
      bound_violation <= 1'b0;
    end else begin
      dram_req_valid  <= 1'b0;
      resp_valid      <= 1'b0;
      bound_violation <= 1'b0;
      unique case (state)
        MC_IDLE: if (req_valid) begin
          dram_req_valid <= 1'b1;
          dram_req       <= req;
          cnt            <= CW'(1);
          have_data      <= 1'b0;
          state          <= MC_WAIT;
        end
        MC_WAIT: begin
          if (cnt != '1) cnt <= cnt + 1'b1;
          if (dram_resp_valid) begin
            have_data <= 1'b1;
            data_q    <= dram_rdata;
          end
          // resp_valid is registered: set here, seen by the requester at cnt+1.
          if (analysis_mode) begin
            if (cnt == CW'(LAT_MAX - 1)) begin
              if (data_now) begin
                resp_valid <= 1'b1;
                resp_rdata <= data_now_v;
                state      <= MC_IDLE;
              end else begin
                bound_violation <= 1'b1;
              end
            end else if (cnt >= CW'(LAT_MAX) && data_now) begin
              resp_valid <= 1'b1;
              resp_rdata <= data_now_v;
              state      <= MC_IDLE;
            end
          end else if (dram_resp_valid) begin
            resp_valid <= 1'b1;
            resp_rdata <= dram_rdata;
            state      <= MC_IDLE;
          end
        end
        default: state <= MC_IDLE;
      endcase
    end
  end
endmodule
