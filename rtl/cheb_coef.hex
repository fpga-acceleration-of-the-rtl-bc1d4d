d9271fd7ce13e3385301c259bda63951ccc350bc0da9512a4672c9b59187278dc052599d951e6000
d77f097a9003c82251c29f31aedbf1eacbefa5740115693046080c6d8713662fc05132e279630ab0
d5d4d41edb64f084508386c3ea4a7d3ecb19ecb5dda98037459ec83a467f3b00c0500c275da7b561
d42bf4a6aa54e8ca4f447995d74ff567ca453ccb0d3d70b14533b3587f09bf37c04dcad883d8c01d
d282c2bf4939a01c4e057833583a4891c97165d22acb85b844c9377b83e38437c04b7d624c62157a
d0d92e23604eca824cc6832f1adcdbe0c89c8123e8b9fec9446023823fedc54ac0492fec14eb6ad4
cf30e5ee1bb0e7c04b879b22ed10492dc7c759d13b2b012143f4a854ccb57766c046e275dd74c036
cd86ae2a448dd8b54a48c0b0154ce4e1c6f32107270cb364438a7110622ff4e8c04494ffa5fe158e
cbde70e723f8a44a4909f47faf9319c1c61f574a6334598a4320ec33720a3688c04247896e876af3
ca346dba85c86ef447cb37430ed718d0c549acadfce4064042b5a9379c36085fc03ff4266e21809d
c88b6b3910ce17aa468c89b42328079ac4750856d3439aa8424bb9e0c7f33deec03b5939ff342b56
c6e26685506ae178454dec95e4cd7cb4c3a13ad9c39874f841e1bea457021342c036be4d9046d612
c538b25a9bbb89aa440f60b4c4990334c2cc3abcd93e990e4176b694ea40189cc0322361215980cd
c39092dc22d31a5342d0737390d62db6c1f72024bd6f7de2410d12aa2199b925c02b10e964d8570e
c1e63eab902ad36241914006e27c2612c122f1c814d636d440a29b4e29fbfba6c021db1086fdac88
c03ddb41c555cf124052168a315d9806c04f09e1d2ad33b64037d107e3d1e5f0c0114a6f524603f8
