// num_pad: turns ten pads into a numeric keypad and reports the keys over a
// serial line to a USB keyboard microcontroller.
//
// Layout in pad coordinates (origin top-left): keys 1-9 fill x = 0..2,
// y = 0..2 row by row (key k at x = (k-1) mod 3, y = (k-1) / 3) and key 0
// sits at (1, 3). The module reads the ten pads through a touchpads read
// port, waiting LATENCY clocks for each reading; a key is pressed when its
// reading is nonzero and below threshold. keys[k-1] is key k and keys[9]
// is key 0. It then sends two bytes, {0, keys[5:0], 0} and
// {1, 00, keys[9:6], 1}; the first and last bits tell the receiver which
// byte is which. After the second byte and GAP idle clocks it starts over.
//
// Layout, the two-byte format and the serial link follow the document;
// GAP, LATENCY and the baud divisor are parameters of this design.
module num_pad #(
  parameter int unsigned N       = 4,
  parameter int unsigned LATENCY = 3,
  parameter int unsigned DIVISOR = 868,
  parameter int unsigned GAP     = 100000
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [11:0]  pad_data,
  input  logic [11:0]  threshold,
  output logic [N+1:0] x_coordinate,
  output logic [N+1:0] y_coordinate,
  output logic         xmit_data,
  output logic [9:0]   keys,
  output logic         frame_sent
);

  typedef enum logic [2:0] {K_READ, K_SEND1, K_WAIT1, K_SEND2, K_WAIT2, K_GAP} kstate_e;
  kstate_e state;

  logic [3:0]  key;                 // pad being read, 0..9 = keys 1..9, 0
  logic [8:0]  acc;
  logic [$clog2(LATENCY+1)-1:0] wait_cnt;
  logic [$clog2(GAP+1)-1:0]     gap_cnt;
  logic [7:0]  tx_data;
  logic        tx_start, tx_busy;

  rs232send #(.DIVISOR(DIVISOR)) u_tx (
    .clk(clk), .reset(reset), .data(tx_data), .start_send(tx_start),
    .xmit_data(xmit_data), .busy(tx_busy)
  );

  always_comb begin
    if (key == 4'd9) begin
      x_coordinate = (N+2)'(1);
      y_coordinate = (N+2)'(3);
    end else begin
      x_coordinate = (N+2)'(key % 3);
      y_coordinate = (N+2)'(key / 3);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= K_READ;
      key        <= '0;
      acc        <= '0;
      keys       <= '0;
      wait_cnt   <= '0;
      gap_cnt    <= '0;
      tx_data    <= '0;
      tx_start   <= 1'b0;
      frame_sent <= 1'b0;
    end else begin
      tx_start   <= 1'b0;
      frame_sent <= 1'b0;
      unique case (state)
        K_READ: begin
          if (wait_cnt != ($bits(wait_cnt))'(LATENCY)) begin
            wait_cnt <= wait_cnt + 1'b1;
          end else begin
            logic hit;
            hit = (pad_data != 12'd0) && (pad_data < threshold);
            wait_cnt <= '0;
            if (key == 4'd9) begin
              key   <= '0;
              keys  <= {hit, acc[8:0]};
              state <= K_SEND1;
            end else begin
              acc[key] <= hit;
              key      <= key + 1'b1;
            end
          end
        end
        K_SEND1: begin
          tx_data  <= {1'b0, keys[5:0], 1'b0};
          tx_start <= 1'b1;
          state    <= K_WAIT1;
        end
        K_WAIT1: if (!tx_start && !tx_busy) state <= K_SEND2;
        K_SEND2: begin
          tx_data  <= {1'b1, 2'b00, keys[9:6], 1'b1};
          tx_start <= 1'b1;
          state    <= K_WAIT2;
        end
        K_WAIT2: if (!tx_start && !tx_busy) begin
          frame_sent <= 1'b1;
          gap_cnt    <= '0;
          state      <= K_GAP;
        end
        default: begin
          gap_cnt <= gap_cnt + 1'b1;
          if (gap_cnt == ($bits(gap_cnt))'(GAP)) state <= K_READ;
        end
      endcase
    end
  end

endmodule
