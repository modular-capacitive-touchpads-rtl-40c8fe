// sensor_block_model: behavioural model of one sensor block (not
// synthesizable) for the system testbenches.
//
// It models the block's microcontroller as an I2C slave at I2C_ADDR with
// the block's one-byte command set:
//   0100_0000 neighbor-detect output off, 0110_0000 on,
//   11 bbb aaa  multiplexer 2 select = bbb, multiplexer 1 select = aaa,
//   0000_00 e2 e1  sense rail output enables,
// and a one-byte read that returns {left, top, right, bottom, 0000} of its
// neighbor-detect inputs. It also models the two RC oscillators: rail k
// toggles with a half period of HALF or HALF_TOUCH time units depending on
// touched[{k-1, select_k}], and is driven onto the rail (OR-ed bus) only
// while its enable is set. mclr_n low clears the outputs.
//
// Bus pins: scl/sda are the resolved lines; sda_pull = 1 pulls SDA low.
module sensor_block_model #(
  parameter logic [6:0] I2C_ADDR   = 7'h55,
  parameter int         HALF       = 5000,
  parameter int         HALF_TOUCH = 6250
) (
  input  logic        scl,
  input  logic        sda,
  output logic        sda_pull,
  input  logic        mclr_n,
  input  logic [3:0]  nd_in,        // indexed top=0, right=1, bottom=2, left=3
  output logic        nd_out,
  input  logic [15:0] touched,
  output logic        rail1,
  output logic        rail2,
  output logic [2:0]  mux1,
  output logic [2:0]  mux2,
  output logic        en1,
  output logic        en2,
  output int          writes_seen,
  output int          reads_seen
);

  typedef enum int {PH_IDLE, PH_ADDR, PH_WDATA, PH_RDATA} phase_e;
  phase_e phase = PH_IDLE;
  int       bit_i = 0, tbit = 0;
  logic [7:0] shreg = 0, txbyte = 0;
  logic       acking = 0, rw = 0;
  logic       osc1 = 0, osc2 = 0;

  initial begin
    sda_pull = 0; nd_out = 0; mux1 = 0; mux2 = 0; en1 = 0; en2 = 0;
    writes_seen = 0; reads_seen = 0;
  end

  always @(negedge mclr_n) begin
    nd_out = 0; mux1 = 0; mux2 = 0; en1 = 0; en2 = 0;
    sda_pull = 0; phase = PH_IDLE;
  end

  // START and STOP conditions
  always @(negedge sda) if (scl && mclr_n) begin
    phase = PH_ADDR; bit_i = 0; acking = 0; sda_pull = 0;
  end
  always @(posedge sda) if (scl) phase = PH_IDLE;

  always @(posedge scl) begin
    if ((phase == PH_ADDR || phase == PH_WDATA) && bit_i < 8 && !acking) begin
      shreg = {shreg[6:0], sda};
      bit_i++;
    end
  end

  task automatic execute(input logic [7:0] b);
    writes_seen++;
    if (b == 8'b0100_0000)       nd_out = 0;
    else if (b == 8'b0110_0000)  nd_out = 1;
    else if (b[7:6] == 2'b11)    begin mux2 = b[5:3]; mux1 = b[2:0]; end
    else if (b[7:2] == 6'b0)     begin en2 = b[1]; en1 = b[0]; end
  endtask

  always @(negedge scl) begin
    case (phase)
      PH_ADDR: begin
        if (bit_i == 8 && !acking) begin
          if (shreg[7:1] == I2C_ADDR) begin
            sda_pull = 1; acking = 1; rw = shreg[0];
          end else phase = PH_IDLE;
        end else if (acking) begin
          acking = 0; bit_i = 0; sda_pull = 0;
          if (rw) begin
            reads_seen++;
            phase  = PH_RDATA;
            txbyte = {nd_in[3], nd_in[0], nd_in[1], nd_in[2], 4'b0000};
            sda_pull = ~txbyte[7];
            tbit = 1;
          end else phase = PH_WDATA;
        end
      end
      PH_WDATA: begin
        if (bit_i == 8 && !acking) begin
          sda_pull = 1; acking = 1; execute(shreg);
        end else if (acking) begin
          sda_pull = 0; acking = 0; phase = PH_IDLE;
        end
      end
      PH_RDATA: begin
        if (tbit < 8) begin sda_pull = ~txbyte[7-tbit]; tbit++; end
        else begin sda_pull = 0; phase = PH_IDLE; end
      end
      default: ;
    endcase
  end

  // RC oscillators
  initial forever begin
    #(touched[{1'b0, mux1}] ? HALF_TOUCH : HALF);
    osc1 = ~osc1;
  end
  initial begin
    #(HALF / 3);
    forever begin
      #(touched[{1'b1, mux2}] ? HALF_TOUCH : HALF);
      osc2 = ~osc2;
    end
  end

  assign rail1 = en1 & osc1;
  assign rail2 = en2 & osc2;

endmodule
